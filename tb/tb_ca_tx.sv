// tb_ca_tx: sending assist with 4-word tokens in an 8-word buffer.
//
// A producer claims space for one token, writes its four words in reverse
// order of offset and releases the token; a sink with random m_tready collects
// the stream. Checks: words leave in order, no word leaves before its token is
// released, a claim is refused while the buffer is full, space comes back only
// after a token's last word has been accepted, and with an always-ready sink a
// lone token's first word appears two cycles after the release (claim, send).
module tb_ca_tx;
  import mampsx_pkg::*;

  localparam int DEPTH = 8, TW = 4, AW = 3, NTOK = 100;

  logic clk = 0, rst_n = 0;
  logic cs_req = 0, cs_gnt, wr_en = 0, rs_req = 0;
  logic [AW:0] cs_n = TW, rs_n = TW, free_words;
  logic [AW-1:0] wr_off = 0;
  word_t wr_data = 0, m_tdata;
  logic m_tvalid, m_tready = 0;

  int checks = 0, failures = 0, got = 0, released = 0, refused = 0;

  ca_tx #(.DEPTH(DEPTH), .TOKEN_WORDS(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at word %0d", what, got); end
  endtask

  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    check(m_tdata == word_t'(got), "word order");
    check(got < released * TW, "word sent only after its token was released");
    got <= got + 1;
  end

  task automatic produce(int t);
    cs_req = 1;
    #1 while (!cs_gnt) begin
      refused++;
      @(posedge clk); #1;
    end
    @(posedge clk); #1 cs_req = 0;
    for (int i = TW - 1; i >= 0; i--) begin
      wr_en = 1; wr_off = i; wr_data = t * TW + i;
      @(posedge clk); #1 wr_en = 0;
    end
    rs_req = 1; @(posedge clk); #1 rs_req = 0;
    released++;
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    m_tready = 1;
    produce(0);
    // after the release edge: one claim cycle, then the first word
    check(!m_tvalid, "first word not before the claim cycle");
    @(posedge clk); #1 check(m_tvalid && m_tdata == 0, "first word one cycle after the claim");
    wait (got == TW);
    m_tready = 0;
    // fill both token slots while the sink is stalled, then try a third
    @(negedge clk) produce(1);
    produce(2);
    check(free_words == 0, "buffer full while the sink stalls");
    cs_req = 1; #1 check(!cs_gnt, "claim refused when full"); cs_req = 0;
    // accept three words: space must not come back before the fourth
    repeat (3) begin @(negedge clk) m_tready = 1; @(posedge clk); #1 m_tready = 0; end
    check(free_words == 0, "space held until the token's last word");
    @(negedge clk) m_tready = 1; @(posedge clk); #1 m_tready = 0;
    @(negedge clk) check(free_words == TW, "token space returned after the last word");
    fork
      for (int t = 3; t < NTOK; t++) produce(t);
      forever begin @(negedge clk) m_tready = ($urandom_range(0, 2) != 0); end
    join_any
    wait (got == NTOK * TW);
    check(refused > 0, "claim refusals seen");
    $display("words=%0d refused claims=%0d", got, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
