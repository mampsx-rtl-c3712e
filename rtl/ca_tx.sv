// ca_tx: sending communication assist of a tile.
//
// The producer (an accelerator) claims space in a C-HEAP circular buffer,
// writes its tokens there and releases them; that side of the buffer is
// brought out unchanged. The assist is the buffer's consumer: when a whole
// token (TOKEN_WORDS words) is ready it claims it, sends its words one by one
// on the AXI-stream output (serialisation), and releases the token only after
// its last word has been accepted, so the space is not reused before the
// transfer has completed.
//
// Timing: a token needs one cycle to be claimed, then one cycle per word while
// m_tready is high. TOKEN_WORDS defaults to 16 (a 512-bit token as 32-bit
// words); the FFoS platform uses one-word tokens. Serialise / acknowledge
// follows the communication model of the document; the one-cycle claim step is
// this design's choice.
module ca_tx
  import mampsx_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned TOKEN_WORDS = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // producer side of the circular buffer
  input  logic          cs_req,
  input  logic [AW:0]   cs_n,
  output logic          cs_gnt,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_off,
  input  word_t         wr_data,
  input  logic          rs_req,
  input  logic [AW:0]   rs_n,
  output logic [AW:0]   free_words,
  // AXI-stream master to the interconnect
  output logic          m_tvalid,
  input  logic          m_tready,
  output word_t         m_tdata
);

  initial begin
    assert (TOKEN_WORDS >= 1 && TOKEN_WORDS <= DEPTH)
      else $fatal(1, "ca_tx: a token must fit in the buffer");
  end

  typedef enum logic {S_CLAIM, S_SEND} state_e;
  state_e      state;
  logic [AW:0] word_idx;
  logic        cd_gnt, sent, last_word;
  logic [AW:0] ready_words;

  assign sent      = m_tvalid && m_tready;
  assign last_word = (word_idx == (AW+1)'(TOKEN_WORDS - 1));
  assign m_tvalid  = (state == S_SEND);

  cheap_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .cs_req, .cs_n, .cs_gnt, .wr_en, .wr_off, .wr_data, .rs_req, .rs_n,
    .cd_req (state == S_CLAIM),
    .cd_n   ((AW+1)'(TOKEN_WORDS)),
    .cd_gnt (cd_gnt),
    .rd_off (word_idx[AW-1:0]),
    .rd_data(m_tdata),
    .rd_req (sent && last_word),
    .rd_n   ((AW+1)'(TOKEN_WORDS)),
    .free_words (free_words),
    .ready_words(ready_words)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_CLAIM;
      word_idx <= '0;
    end else begin
      unique case (state)
        S_CLAIM: if (cd_gnt) begin
          state    <= S_SEND;
          word_idx <= '0;
        end
        S_SEND: if (sent) begin
          if (last_word) state <= S_CLAIM;
          word_idx <= word_idx + 1'b1;
        end
      endcase
    end
  end

  // AXI-stream rule: data is held stable while valid waits for ready.
  a_stable : assert property (@(posedge clk) disable iff (!rst_n)
      m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata))
    else $error("ca_tx: stream word changed before it was accepted");

endmodule
