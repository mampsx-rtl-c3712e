// axis_fifo: AXI-stream FIFO link between two tiles (the FIFO interconnect).
//
// A first-in first-out queue of DEPTH 32-bit words that also has a fixed
// transfer latency: a word accepted in cycle t may leave no earlier than cycle
// t+LATENCY (and no earlier than t+1). Each entry carries a saturating age
// counter; the head is offered on the output once its age has reached
// LATENCY. This makes the link behave like the latency-rate server used to
// model it: a fixed delay followed by at most one word per cycle.
// s_tready is high while an entry is free, or when the head leaves in the same
// cycle. Defaults follow the example platform: latency 3 time units, one word
// deep, 32 bits wide. Counting latency in clock cycles is this design's
// reading of "time units".
module axis_fifo
  import mampsx_pkg::*;
#(
  parameter int unsigned DEPTH   = 1,
  parameter int unsigned LATENCY = 3,
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW = $clog2(LATENCY + 1) + 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_tvalid,
  output logic  s_tready,
  input  word_t s_tdata,
  output logic  m_tvalid,
  input  logic  m_tready,
  output word_t m_tdata
);

  word_t         data [DEPTH];
  logic [LW-1:0] age  [DEPTH];
  logic [PW-1:0] rd_p, wr_p;
  logic [PW:0]   count;
  logic          push, pop;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign m_tvalid = (count != '0) && (age[rd_p] >= LW'(LATENCY));
  assign m_tdata  = data[rd_p];
  assign pop      = m_tvalid && m_tready;
  assign s_tready = (count != (PW+1)'(DEPTH)) || pop;
  assign push     = s_tvalid && s_tready;

  always_ff @(posedge clk) begin
    if (push) data[wr_p] <= s_tdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p  <= '0;
      wr_p  <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) age[i] <= '0;
    end else begin
      // Entries age by one per cycle up to LATENCY; a new entry starts at 1,
      // so it is one cycle old when it can first be seen.
      for (int i = 0; i < DEPTH; i++)
        if (age[i] < LW'(LATENCY)) age[i] <= age[i] + 1'b1;
      if (push) begin
        age[wr_p] <= LW'(1);
        wr_p      <= nxt(wr_p);
      end
      if (pop) rd_p <= nxt(rd_p);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_stable : assert property (@(posedge clk) disable iff (!rst_n)
      m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata))
    else $error("axis_fifo: output word changed before it was accepted");

endmodule
