// tb_ca_rx: receiving assist with 4-word tokens in an 8-word buffer.
//
// A random-rate source streams numbered words; a random-rate consumer claims
// one token when four words are ready, reads its words in reverse order,
// checks them and releases them. Checks: ready data only ever grows by whole
// tokens, every word arrives in order, s_tready falls when the buffer is full
// (back-pressure seen), and a lone token becomes ready one cycle after its
// last word was accepted.
module tb_ca_rx;
  import mampsx_pkg::*;

  localparam int DEPTH = 8, TW = 4, AW = 3;

  logic clk = 0, rst_n = 0;
  logic s_tvalid = 0, s_tready;
  word_t s_tdata = 0;
  logic cd_req = 0, cd_gnt, rd_req = 0;
  logic [AW:0] cd_n = TW, rd_n = TW, ready_words;
  logic [AW-1:0] rd_off = 0;
  word_t rd_data;

  // s_tready as it was at the last rising edge, for the source's bookkeeping
  logic s_tready_q = 0;
  always @(posedge clk) s_tready_q <= s_tready;

  int checks = 0, failures = 0, sent = 0, got = 0, full_seen = 0;

  ca_rx #(.DEPTH(DEPTH), .TOKEN_WORDS(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at word %0d", what, got); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && s_tready) sent <= sent + 1;
    if (s_tvalid && !s_tready) full_seen <= full_seen + 1;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of a lone token: ready one cycle after its last word
    for (int i = 0; i < TW; i++) begin
      @(negedge clk); s_tvalid = 1; s_tdata = i;
    end
    @(negedge clk); s_tvalid = 0;
    check(ready_words == TW, "lone token ready one cycle after its last word");
    // drain it
    cd_req = 1; #1 check(cd_gnt, "claim of a ready token");
    @(posedge clk); #1 cd_req = 0;
    for (int i = TW - 1; i >= 0; i--) begin
      rd_off = i; #1 check(rd_data == word_t'(i), "lone token data");
    end
    rd_req = 1; @(posedge clk); #1 rd_req = 0;
    got = TW;
    // random streaming
    fork
      begin : src
        for (int w = TW; w < 400; ) begin
          @(negedge clk);
          if (s_tvalid && s_tready_q) w++;
          s_tvalid = (w < 400) && ($urandom_range(0, 3) != 0);
          s_tdata  = w;
        end
        @(negedge clk) s_tvalid = 0;
      end
      begin : snk
        while (got < 400) begin
          @(negedge clk);
          check(ready_words % TW == 0, "ready data grows by whole tokens");
          if (ready_words >= TW && $urandom_range(0, 4) == 0) begin
            cd_req = 1;
            @(posedge clk); #1 cd_req = 0;
            for (int i = TW - 1; i >= 0; i--) begin
              rd_off = i; #1 check(rd_data == word_t'(got + i), "token data in order");
            end
            rd_req = 1; @(posedge clk); #1 rd_req = 0;
            got += TW;
          end
        end
      end
    join
    check(full_seen > 0, "back-pressure when the buffer is full");
    $display("words=%0d back-pressure cycles=%0d", got, full_seen);
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
