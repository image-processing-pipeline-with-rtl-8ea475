// sccb_slave_model: behavioural SCCB listener for testbenches.
//
// Decodes START and STOP (SIO_D edges while SIO_C is high) and samples SIO_D
// on each rising SIO_C edge. Each transaction's bytes (the ninth bit of every
// byte dropped) are packed as {id, reg, value} into `writes` on STOP; `errors`
// counts transactions that did not carry exactly three bytes.
module sccb_slave_model (
  input logic sioc,
  input logic siod
);
  logic [23:0] writes [$];
  int          errors = 0;
  int          nbits  = 0;
  logic [27:0] sh;
  bit          in_txn = 0;

  always @(negedge siod) if (sioc === 1'b1) begin
    in_txn = 1; nbits = 0; sh = '0;
  end

  always @(posedge siod) if (sioc === 1'b1 && in_txn) begin
    in_txn = 0;
    // 27 data bits, then the SIO_C rise that precedes STOP
    if (nbits != 28) errors++;
    else writes.push_back({sh[27:20], sh[18:11], sh[9:2]});
  end

  always @(posedge sioc) if (in_txn) begin
    sh = {sh[26:0], siod};
    nbits++;
  end
endmodule
