// tb_seven_seg: self-checking test of the multiplexed seven-segment driver.
//
// Shows all sixteen characters, then random digits with random blanking, and for every refresh
// slot checks that exactly one anode is low, that each digit is lit for
// REFRESH cycles, and that its segment pattern matches the character (given
// here as the lit segments, "abcdefg") or is dark when blanked.
module tb_seven_seg;
  localparam int R = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0][3:0] digits;
  logic [7:0] blank, an;
  logic [6:0] seg;

  seven_seg #(.REFRESH(R)) dut (.*);

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
  int checks = 0, failures = 0;

  function automatic logic [6:0] pattern(int v);
    logic [6:0] p;
    p = '1;                             // active low: all dark
    for (int k = 0; k < lit[v].len(); k++) p[lit[v][k] - "a"] = 1'b0;
    return p;
  endfunction

  initial begin
    int d, run, prev, runs;
    digits = '0; blank = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      // rounds 0 and 1 show all sixteen characters, the rest are random
      for (int i = 0; i < 8; i++) digits[i] = (round < 2) ? 4'(8 * round + i) : 4'($urandom);
      blank = (round < 2) ? 8'h00 : 8'($urandom);
      // let the new values reach every slot, then watch one full scan
      repeat (8 * R + 2) @(posedge clk);
      prev = -1; run = 0; runs = 0;
      repeat (8 * R * 2) begin
        @(posedge clk); #1;
        checks++;
        if (!$onehot(~an)) begin failures++; $display("FAIL: anodes %b", an); continue; end
        d = $clog2(int'(~an) & 8'hFF);
        if (d == prev) run++;
        else begin
          if (runs > 1 && run != R) begin failures++; $display("FAIL: digit %0d lit %0d cycles", prev, run); end
          checks++;
          prev = d; run = 1; runs++;
        end
        checks++;
        if (seg != (blank[d] ? 7'h7F : pattern(int'(digits[d])))) begin
          failures++; $display("FAIL: digit %0d value %h blank %b seg %b", d, digits[d], blank[d], seg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
