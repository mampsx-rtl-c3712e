// ca_rx: receiving communication assist of a tile.
//
// Words arriving on the AXI-stream input are written into a C-HEAP circular
// buffer (cheap_buffer). The assist acts as the buffer's producer: for every
// word it claims one word of space and writes it; after TOKEN_WORDS words it
// releases the whole token, so the consumer (an accelerator) only ever sees
// complete tokens. This is the de-serialisation of words into tokens. The
// consumer side of the buffer (claim data, read at an offset, release data) is
// brought out unchanged for the accelerator.
//
// Timing: s_tready is high while the buffer has a free word; a word accepted
// in cycle t is part of a released token, visible to the consumer, from cycle
// t+1 on if it was the token's last word. One word per cycle at most.
// TOKEN_WORDS defaults to 16, a 512-bit token of the running example carried
// as 32-bit words; the FFoS platform uses one-word tokens. Buffer depth is a
// parameter (the mapping tool sizes it per channel).
module ca_rx
  import mampsx_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned TOKEN_WORDS = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // AXI-stream slave from the interconnect
  input  logic          s_tvalid,
  output logic          s_tready,
  input  word_t         s_tdata,
  // consumer side of the circular buffer
  input  logic          cd_req,
  input  logic [AW:0]   cd_n,
  output logic          cd_gnt,
  input  logic [AW-1:0] rd_off,
  output word_t         rd_data,
  input  logic          rd_req,
  input  logic [AW:0]   rd_n,
  output logic [AW:0]   ready_words
);

  initial begin
    assert (TOKEN_WORDS >= 1 && TOKEN_WORDS <= DEPTH)
      else $fatal(1, "ca_rx: a token must fit in the buffer");
  end

  logic [AW:0] word_cnt;        // words of the current token already claimed
  logic        cs_gnt, last_word, take;
  logic [AW:0] free_words;

  assign take      = s_tvalid && s_tready;
  assign last_word = (word_cnt == (AW+1)'(TOKEN_WORDS - 1));

  cheap_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .cs_req (s_tvalid),
    .cs_n   ((AW+1)'(1)),
    .cs_gnt (cs_gnt),
    .wr_en  (take),
    .wr_off (word_cnt[AW-1:0]),
    .wr_data(s_tdata),
    .rs_req (take && last_word),
    .rs_n   ((AW+1)'(TOKEN_WORDS)),
    .cd_req, .cd_n, .cd_gnt, .rd_off, .rd_data, .rd_req, .rd_n,
    .free_words (free_words),
    .ready_words(ready_words)
  );

  assign s_tready = (free_words != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         word_cnt <= '0;
    else if (take)      word_cnt <= last_word ? '0 : word_cnt + 1'b1;
  end

  a_claim : assert property (@(posedge clk) disable iff (!rst_n) take |-> cs_gnt)
    else $error("ca_rx: word accepted without claimed space");

endmodule
