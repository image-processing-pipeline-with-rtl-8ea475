// axis_fifo: synchronous first-in first-out buffer for 64-bit stream beats.
//
// Holds up to DEPTH beats (data and TLAST) in a memory array with read and
// write pointers and an occupancy count. s_tready is high while there is room,
// m_tvalid while it holds a beat; both sides may move in the same cycle.
// Besides the count it gives two level flags for a controller that must know a
// whole burst can move without stalling: `low` is high while fewer than MARK
// beats are stored, `high` while there is room for fewer than MARK more.
// The head beat is read from the array combinationally (first-word
// fall-through: it is on m_tdata whenever m_tvalid is high).
// The depths (512 before the memory mover, 64 after it) and the 8-beat level
// flags follow the design description; the structure is this design's own.
module axis_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned MARK  = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [63:0]                 s_tdata,
  input  logic                        s_tlast,
  input  logic                        s_tvalid,
  output logic                        s_tready,
  output logic [63:0]                 m_tdata,
  output logic                        m_tlast,
  output logic                        m_tvalid,
  input  logic                        m_tready,
  output logic [$clog2(DEPTH+1)-1:0]  level,
  output logic                        low,
  output logic                        high
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [64:0]   mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          push, pop;

  assign s_tready = (level != LW'(DEPTH));
  assign m_tvalid = (level != '0);
  assign push     = s_tvalid && s_tready;
  assign pop      = m_tvalid && m_tready;
  assign {m_tlast, m_tdata} = {mem[rp][0], mem[rp][64:1]};
  assign low      = (level < LW'(MARK));
  assign high     = (LW'(DEPTH) - level < LW'(MARK));

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= {s_tdata, s_tlast};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + LW'(push) - LW'(pop);
    end
  end

  // stream rule: a beat offered is held until taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (m_tvalid && !m_tready) |=> m_tvalid;
  endproperty
  assert property (p_hold);
endmodule
