// seven_seg: time-multiplexed driver for the board's eight seven-segment digits.
//
// Each digit shows a 4-bit value as a hexadecimal character, or nothing when
// its blank bit is set. One digit is lit at a time, for REFRESH clock cycles
// each, so the whole display is refreshed every 8*REFRESH cycles. Anodes and
// segments are active low, as on the Nexys 4 DDR board; seg[0] is segment A
// and seg[6] segment G. The outputs are registered. The display block is named
// in the design description; the decoding and refresh are this design's.
module seven_seg #(
  parameter int unsigned REFRESH = 25_000    // about 1 ms per digit at 25.2 MHz
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0][3:0] digits,
  input  logic [7:0]      blank,
  output logic [7:0]      an,
  output logic [6:0]      seg
);
  logic [$clog2(REFRESH)-1:0] cnt;
  logic [2:0]                 idx;

  function automatic logic [6:0] decode(input logic [3:0] v);
    // bit i = segment i (A..G), 1 = lit
    unique case (v)
      4'h0: return 7'b0111111;
      4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;
      4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;
      4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;
      4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;
      4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;
      4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;
      4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;
      default: return 7'b1110001;  // F
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      idx <= '0;
      an  <= '1;
      seg <= '1;
    end else begin
      if (cnt == $bits(cnt)'(REFRESH - 1)) begin
        cnt <= '0;
        idx <= idx + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
      an  <= ~(8'b1 << idx);
      seg <= blank[idx] ? 7'h7F : ~decode(digits[idx]);
    end
  end
endmodule
