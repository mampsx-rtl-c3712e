// tb_axis_fifo: two FIFO links, the default one (1 word, latency 3) and a
// 4-word link with latency 6.
//
// Each link gets a random-rate source and sink of numbered words. Checks: order,
// no word leaves earlier than LATENCY cycles after it entered, a lone word
// into an empty link appears exactly LATENCY cycles later, and with source and
// sink always ready the link passes min(1, DEPTH/LATENCY) words per cycle.
module tb_axis_fifo;
  import mampsx_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit done0 = 0, done1 = 0;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_link
    localparam int D = (g == 0) ? 1 : 4;
    localparam int L = (g == 0) ? 3 : 6;
    logic s_tvalid = 0, s_tready, m_tvalid, m_tready = 0;
    word_t s_tdata = 0, m_tdata;
    longint cyc = 0, t_in[$];
    int n_in = 0, n_out = 0;
    bit rnd = 0;

    if (g == 0) begin : g_dflt
      axis_fifo dut (.clk, .rst_n, .s_tvalid, .s_tready, .s_tdata,
                     .m_tvalid, .m_tready, .m_tdata);
    end else begin : g_deep
      axis_fifo #(.DEPTH(D), .LATENCY(L)) dut (.clk, .rst_n, .s_tvalid, .s_tready, .s_tdata,
                     .m_tvalid, .m_tready, .m_tdata);
    end

    always @(posedge clk) if (rst_n) begin
      cyc <= cyc + 1;
      if (s_tvalid && s_tready) begin t_in.push_back(cyc); n_in <= n_in + 1; end
      if (m_tvalid && m_tready) begin
        longint t = t_in.pop_front();
        check(m_tdata == word_t'(n_out), "order");
        check(cyc - t >= L, "latency at least LATENCY");
        n_out <= n_out + 1;
      end
    end

    initial begin
      int start;
      wait (rst_n);
      // lone word: exactly L cycles
      @(negedge clk) s_tvalid = 1; s_tdata = 0; m_tready = 1;
      @(negedge clk) s_tvalid = 0;
      for (int k = 1; k < L; k++) begin
        check(!m_tvalid, "lone word not early"); @(negedge clk);
      end
      check(m_tvalid && m_tdata == 0, "lone word after exactly LATENCY cycles");
      @(negedge clk);
      // steady-state rate with both ends always ready
      s_tvalid = 1;
      repeat (2 * L + 2) begin s_tdata = n_in; @(negedge clk); end
      start = n_out;
      repeat (60 * L) begin s_tdata = n_in; @(negedge clk); end
      check(n_out - start >= 60 * L * ((D < L) ? D : L) / L - 1 &&
            n_out - start <= 60 * L * ((D < L) ? D : L) / L + 1, "rate min(1, DEPTH/LATENCY)");
      $display("link %0d: %0d words in %0d cycles", g, n_out - start, 60 * L);
      // random traffic
      repeat (3000) begin
        s_tdata = n_in;
        s_tvalid = $urandom_range(0, 1);
        m_tready = $urandom_range(0, 3) != 0;
        @(negedge clk);
      end
      s_tvalid = 0; m_tready = 1;
      repeat (3 * L + 3) @(negedge clk);
      check(n_out == n_in, "all words delivered");
      if (g == 0) done0 = 1; else done1 = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done0 && done1);
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
