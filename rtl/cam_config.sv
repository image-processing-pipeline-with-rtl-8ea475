// cam_config: camera configuration sequencer.
//
// On a `start` pulse it walks the configuration ROM from address 0. Each
// 16-bit entry {register, value} is split into two bytes handed to the SCCB
// master one at a time: the register byte, then, when the master raises
// `sccb_ready` again, the value byte. After the write completes (`sccb_done`)
// it moves to the next address. A 16'hFFF0 entry waits DELAY clock cycles
// instead of writing; 16'hFFFF ends the walk and raises `done`, which stays
// high until the next `start`. The walk, the two-byte split and the ready
// handshake follow the design description; the two code words are this
// design's choice.
module cam_config #(
  parameter int unsigned DELAY = 25_200  // 1 ms at 25.2 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  // configuration ROM
  output logic [4:0]  rom_addr,
  input  logic [15:0] rom_data,
  // SCCB master
  output logic        sccb_start,
  output logic [7:0]  sccb_data,
  input  logic        sccb_ready,
  input  logic        sccb_done
);
  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_SEND_REG, C_SEND_VAL, C_WAIT_DONE, C_DELAY, C_DONE} state_t;
  state_t state;
  logic [15:0] entry;
  logic [$clog2(DELAY+1)-1:0] dcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      rom_addr   <= '0;
      entry      <= '0;
      dcnt       <= '0;
      sccb_start <= 1'b0;
      sccb_data  <= '0;
      done       <= 1'b0;
    end else begin
      sccb_start <= 1'b0;
      unique case (state)
        C_IDLE, C_DONE: if (start) begin
          rom_addr <= '0;
          done     <= 1'b0;
          state    <= C_FETCH;
        end
        C_FETCH: begin
          entry <= rom_data;
          if (rom_data == 16'hFFFF) begin
            done  <= 1'b1;
            state <= C_DONE;
          end else if (rom_data == 16'hFFF0) begin
            dcnt  <= $bits(dcnt)'(DELAY);
            state <= C_DELAY;
          end else begin
            state <= C_SEND_REG;
          end
        end
        C_SEND_REG: if (sccb_ready && !sccb_start) begin
          sccb_start <= 1'b1;
          sccb_data  <= entry[15:8];
          state      <= C_SEND_VAL;
        end
        C_SEND_VAL: if (sccb_ready && !sccb_start) begin
          sccb_start <= 1'b1;
          sccb_data  <= entry[7:0];
          state      <= C_WAIT_DONE;
        end
        C_WAIT_DONE: if (sccb_done) begin
          rom_addr <= rom_addr + 1'b1;
          state    <= C_FETCH;
        end
        C_DELAY: begin
          if (dcnt == '0) begin
            rom_addr <= rom_addr + 1'b1;
            state    <= C_FETCH;
          end else begin
            dcnt <= dcnt - 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
