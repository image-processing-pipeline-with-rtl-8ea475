// sccb_master: SCCB (Omnivision's I2C-like bus) three-phase write master.
//
// A register write is START, device ID byte, register address byte, data byte,
// STOP; each byte is followed by a ninth "don't care" bit during which SIO_D is
// released. The master takes one byte at a time: the first byte offered after
// idle (the register address) opens a transaction, is sent after the ID, and
// then `ready` rises again to ask for the second byte (the value), which is
// sent before STOP. `ready` is high whenever a byte can be offered with
// `start`; `done` pulses when STOP has completed.
//
// SIO_C runs at clk / (4*QUARTER). Each bit takes four quarters: SIO_C low
// while SIO_D changes, then high for two quarters (the slave samples on the
// rising edge), then low. SIO_D is open drain: siod_oe=1 drives siod_out,
// siod_oe=0 releases the line (pulled high). The byte-at-a-time handshake
// follows the design description; bit timing, clock rate and the ID default
// (0x42, the OV7670 write address) are this design's choices.
module sccb_master #(
  parameter int unsigned QUARTER = 63,        // 25.2 MHz / (4*63) = 100 kHz
  parameter logic [7:0]  DEV_ID  = 8'h42
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       ready,
  output logic       done,
  output logic       sioc,
  output logic       siod_out,
  output logic       siod_oe
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_BITS, S_WAIT2, S_STOP} state_t;
  state_t state;

  logic [$clog2(QUARTER+1)-1:0] qcnt;
  logic [1:0]  quarter;
  logic [4:0]  bitn;        // bit index within the current group of bytes
  logic [4:0]  nbits;       // bits in the current group
  logic [17:0] shreg;       // bits still to send, MSB first, X bits as 1
  logic [17:0] xmask;       // 1 where the bit is a don't-care (released)
  logic        second;      // sending the second (data) byte
  logic        tick;

  assign tick  = (qcnt == '0);
  assign ready = (state == S_IDLE) || (state == S_WAIT2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      qcnt     <= '0;
      quarter  <= '0;
      bitn     <= '0;
      nbits    <= '0;
      shreg    <= '0;
      xmask    <= '0;
      second   <= 1'b0;
      done     <= 1'b0;
      sioc     <= 1'b1;
      siod_out <= 1'b1;
      siod_oe  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE && state != S_WAIT2)
        qcnt <= tick ? $bits(qcnt)'(QUARTER-1) : qcnt - 1'b1;
      unique case (state)
        S_IDLE: begin
          sioc    <= 1'b1;
          siod_oe <= 1'b0;
          if (start) begin
            // ID byte + X, address byte + X
            shreg   <= {DEV_ID, 1'b1, data, 1'b1};
            xmask   <= {8'h00, 1'b1, 8'h00, 1'b1};
            nbits   <= 5'd18;
            bitn    <= '0;
            second  <= 1'b0;
            quarter <= '0;
            qcnt    <= $bits(qcnt)'(QUARTER-1);
            state   <= S_START;
            // START: SIO_D falls while SIO_C is high
            siod_oe  <= 1'b1;
            siod_out <= 1'b0;
          end
        end
        S_START: if (tick) begin
          quarter <= quarter + 1'b1;
          if (quarter == 2'd1) begin
            sioc    <= 1'b0;
            quarter <= '0;
            state   <= S_BITS;
          end
        end
        S_BITS: if (tick) begin
          quarter <= quarter + 1'b1;
          unique case (quarter)
            2'd0: begin
              sioc     <= 1'b0;
              siod_oe  <= !xmask[17];
              siod_out <= shreg[17];
            end
            2'd1: sioc <= 1'b1;
            2'd2: sioc <= 1'b1;
            2'd3: begin
              sioc  <= 1'b0;
              shreg <= shreg << 1;
              xmask <= xmask << 1;
              bitn  <= bitn + 1'b1;
              if (bitn == nbits - 1'b1) begin
                if (!second) state <= S_WAIT2;
                else begin
                  state   <= S_STOP;
                  siod_oe <= 1'b1;
                  siod_out <= 1'b0;
                end
              end
            end
          endcase
        end
        S_WAIT2: begin
          // SIO_C held low between the two bytes
          if (start) begin
            shreg   <= {data, 1'b1, 9'h000};
            xmask   <= {8'h00, 1'b1, 9'h000};
            nbits   <= 5'd9;
            bitn    <= '0;
            second  <= 1'b1;
            quarter <= '0;
            qcnt    <= $bits(qcnt)'(QUARTER-1);
            state   <= S_BITS;
          end
        end
        S_STOP: if (tick) begin
          quarter <= quarter + 1'b1;
          unique case (quarter)
            2'd0: begin siod_oe <= 1'b1; siod_out <= 1'b0; end
            2'd1: sioc <= 1'b1;
            2'd2: siod_oe <= 1'b0;            // SIO_D rises while SIO_C high
            2'd3: begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
