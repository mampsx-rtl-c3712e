// cheap_buffer: C-HEAP circular buffer shared by one producer and one consumer.
//
// The buffer is a word memory of DEPTH entries administered by four pointers
// that run around the ring in the order
//   read start -> read end -> write start -> write end -> (read start + DEPTH).
// The stretches between them are: claimed read data (rs..re), data ready for
// the consumer (re..ws), claimed write data (ws..we) and free space (we..rs).
// The four synchronisation primitives move one pointer each:
//   claim space  (producer) moves write end   if enough free space exists,
//   release space(producer) moves write start (publishes written words),
//   claim data   (consumer) moves read end    if enough ready data exists,
//   release data (consumer) moves read start  (frees read words).
// A claim is a try: its grant (cs_gnt / cd_gnt) is combinational and the pointer
// moves at the clock edge only when granted. The producer writes any word of
// its claimed window (offset from write start); the consumer reads any word of
// its claimed window (offset from read start) through a combinational read
// port. This is what allows out-of-order access by window kernels.
//
// Pointers are kept one bit wider than the address, so DEPTH must be a power
// of two. A claim and a release on the same side may happen in the same
// cycle; the release may then include the words claimed in that cycle.
// The primitives and the ring follow the C-HEAP scheme; widths, the single
// read/write port and the same-cycle claim+release rule are this design's.
module cheap_buffer
  import mampsx_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // producer side
  input  logic          cs_req,    // claim space
  input  logic [AW:0]   cs_n,
  output logic          cs_gnt,
  input  logic          wr_en,     // write a claimed word
  input  logic [AW-1:0] wr_off,    // offset from write start
  input  word_t         wr_data,
  input  logic          rs_req,    // release space
  input  logic [AW:0]   rs_n,
  // consumer side
  input  logic          cd_req,    // claim data
  input  logic [AW:0]   cd_n,
  output logic          cd_gnt,
  input  logic [AW-1:0] rd_off,    // offset from read start
  output word_t         rd_data,
  input  logic          rd_req,    // release data
  input  logic [AW:0]   rd_n,
  // status, in words
  output logic [AW:0]   free_words,
  output logic [AW:0]   ready_words
);

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $fatal(1, "cheap_buffer: DEPTH must be a power of two, at least 2");
  end

  logic [AW:0] rs_p, re_p, ws_p, we_p;   // read start/end, write start/end
  word_t       mem [DEPTH];

  logic [AW:0] claimed_wr, claimed_rd;
  assign free_words  = (AW+1)'(DEPTH) - (we_p - rs_p);
  assign ready_words = ws_p - re_p;
  assign claimed_wr  = we_p - ws_p;
  assign claimed_rd  = re_p - rs_p;

  assign cs_gnt = cs_req && (cs_n <= free_words);
  assign cd_gnt = cd_req && (cd_n <= ready_words);

  logic [AW:0] rd_ptr, wr_ptr;
  assign rd_ptr  = rs_p + (AW+1)'(rd_off);
  assign wr_ptr  = ws_p + (AW+1)'(wr_off);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_p <= '0;
      re_p <= '0;
      ws_p <= '0;
      we_p <= '0;
    end else begin
      if (cs_gnt) we_p <= we_p + cs_n;
      if (rs_req) ws_p <= ws_p + rs_n;
      if (cd_gnt) re_p <= re_p + cd_n;
      if (rd_req) rs_p <= rs_p + rd_n;
    end
  end

  // Protocol rules: only claimed words may be written or released.
  a_rel_space : assert property (@(posedge clk) disable iff (!rst_n)
      rs_req |-> rs_n <= claimed_wr + (cs_gnt ? cs_n : '0))
    else $error("cheap_buffer: release space beyond the claimed window");
  a_rel_data : assert property (@(posedge clk) disable iff (!rst_n)
      rd_req |-> rd_n <= claimed_rd + (cd_gnt ? cd_n : '0))
    else $error("cheap_buffer: release data beyond the claimed window");
  a_write : assert property (@(posedge clk) disable iff (!rst_n)
      wr_en |-> (AW+1)'(wr_off) < claimed_wr + (cs_gnt ? cs_n : '0))
    else $error("cheap_buffer: write outside the claimed window");

endmodule
