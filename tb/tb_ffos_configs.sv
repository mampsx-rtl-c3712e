// tb_ffos_configs: the eight FFoS configurations (Proj, Eros, Bin), each a
// full-size platform (120x45, C=16) generated with its own parameters.
//
// For each configuration the testbench plays the processor tile, including the
// actors that the configuration leaves in software: it computes them with the
// reference model and feeds the first hardware actor's input link (pixels and
// threshold, packed binary image on D4, or eroded image on D5). It then checks
// the words leaving the last hardware actor (D4, D5 or the centre tokens). In
// configuration (1,0,1) it also takes D4 from Bin and feeds the eroded image
// back to Proj on D5.
// Two frames per configuration, the second with a random-rate sink. In
// configuration (0,0,0) there is no hardware, and all ports must stay idle.
module tb_ffos_configs;
  import mampsx_pkg::*;
  import ffos_model_pkg::*;

  localparam int W = IMG_W, H = IMG_H, C = 16, NF = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar g = 0; g < 8; g++) begin : g_cfg
    localparam bit P = g[2], E = g[1], B = g[0];

    logic  s_pix_tvalid, s_pix_tready, s_thr_tvalid, s_thr_tready;
    logic  m_ctr_tvalid, m_ctr_tready, bin_done, eros_done, proj_done;
    word_t s_pix_tdata, s_thr_tdata, m_ctr_tdata;
    logic  m_d4_tvalid, m_d4_tready, s_d4_tvalid, s_d4_tready;
    logic  m_d5_tvalid, m_d5_tready, s_d5_tvalid, s_d5_tready;
    word_t m_d4_tdata, s_d4_tdata, m_d5_tdata, s_d5_tdata;

    mampsx_ffos_top #(.PROJ_HW(P), .EROS_HW(E), .BIN_HW(B)) dut (.*);

    bit [31:0] in_q[$], thr_q[$], exp_q[$];
    // configuration (1,0,1) has two hardware islands: Bin sends D4 to the
    // processor, which erodes in software and feeds Proj through D5
    bit [31:0] in2_q[$], exp2_q[$];
    bit slow = 0;
    int got = 0, idle_bad = 0;
    // the stream the testbench feeds and the one it checks
    logic  in_v, in_r, out_v, out_r;
    word_t out_d;

    assign in_r  = B ? s_pix_tready : E ? s_d4_tready : s_d5_tready;
    assign out_v = P ? m_ctr_tvalid : E ? m_d5_tvalid : m_d4_tvalid;
    assign out_d = P ? m_ctr_tdata  : E ? m_d5_tdata  : m_d4_tdata;

    always @(negedge clk) begin
      in_v         = in_q.size() > 0;
      s_pix_tvalid = B && in_v;
      s_d4_tvalid  = !B && E && in_v;
      s_d5_tvalid  = (!B && !E && P && in_v) || (B && !E && P && in2_q.size() > 0);
      s_pix_tdata  = in_v ? in_q[0] : 0;
      s_d4_tdata   = s_pix_tdata;
      s_d5_tdata   = (B && !E && P) ? (in2_q.size() > 0 ? in2_q[0] : 0) : s_pix_tdata;
      s_thr_tvalid = B && thr_q.size() > 0;
      s_thr_tdata  = thr_q.size() > 0 ? thr_q[0] : 0;
      out_r        = !slow || $urandom_range(0, 3) == 0;
      m_ctr_tready = P && out_r;
      m_d5_tready  = !P && E && out_r;
      m_d4_tready  = !E && B && out_r;
    end

    always @(posedge clk) if (rst_n) begin
      if (in_v && in_r && (B || E || P)) void'(in_q.pop_front());
      if (s_thr_tvalid && s_thr_tready) void'(thr_q.pop_front());
      if (B && !E && P) begin
        if (s_d5_tvalid && s_d5_tready) void'(in2_q.pop_front());
        if (m_d4_tvalid && m_d4_tready) begin
          check(exp2_q.size() > 0 && m_d4_tdata == exp2_q[0], "config 101 D4 output");
          void'(exp2_q.pop_front());
        end
      end
      if (out_v && out_r) begin
        check(exp_q.size() > 0 && out_d == exp_q[0], $sformatf("config %0d%0d%0d output", P, E, B));
        void'(exp_q.pop_front());
        got <= got + 1;
      end
      if (g == 0 && (s_pix_tready || s_thr_tready || s_d4_tready || s_d5_tready ||
                     m_ctr_tvalid || m_d4_tvalid || m_d5_tvalid)) idle_bad++;
    end

    initial begin
      wait (rst_n);
      for (int f = 0; f < NF; f++) begin
        automatic bit [31:0] pix[$];
        automatic bit [31:0] thr = 110 + 20 * f;
        automatic bitimg_t bi, er;
        automatic words_t ins, ex;
        wafer(pix, W, H, 3 + f, 4, 60, 200 + 10 * g + f);
        bi = binarise(pix, thr);
        er = erode(bi, W, H);
        // input of the first hardware actor
        if (B)      foreach (pix[i]) ins.push_back(pix[i]);
        else if (E) ins = pack(bi, W, H);
        else        ins = pack(er, W, H);
        // output of the last hardware actor
        if (P)      ex = centres(er, W, H, C);
        else if (E) ex = pack(er, W, H);
        else        ex = pack(bi, W, H);
        if (g == 0) begin
          repeat (200) @(posedge clk);
        end else begin
          foreach (ex[i]) exp_q.push_back(ex[i]);
          if (B) thr_q.push_back(thr);
          foreach (ins[i]) in_q.push_back(ins[i]);
          if (B && !E && P) begin
            automatic words_t d4 = pack(bi, W, H), d5 = pack(er, W, H);
            foreach (d4[i]) exp2_q.push_back(d4[i]);
            foreach (d5[i]) in2_q.push_back(d5[i]);
          end
          slow = (f == 1);
          wait (exp_q.size() == 0 && in_q.size() == 0 && exp2_q.size() == 0 && in2_q.size() == 0);
        end
      end
      repeat (20) @(posedge clk);
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7]);
    check(g_cfg[0].idle_bad == 0, "configuration 000: all ports idle");
    check(g_cfg[1].got > 0 && g_cfg[2].got > 0 && g_cfg[3].got > 0 && g_cfg[4].got > 0 &&
          g_cfg[5].got > 0 && g_cfg[6].got > 0 && g_cfg[7].got > 0, "every configuration produced output");
    $display("words out per configuration (PEB=001..111): %0d %0d %0d %0d %0d %0d %0d",
             g_cfg[1].got, g_cfg[2].got, g_cfg[3].got, g_cfg[4].got, g_cfg[5].got,
             g_cfg[6].got, g_cfg[7].got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    for (int i = 0; i < 8; i++) $display("  configuration %0d done=%0d", i, done[i]);
    $display("  left: 1:%0d/%0d 2:%0d/%0d 3:%0d/%0d 4:%0d/%0d 5:%0d/%0d 6:%0d/%0d 7:%0d/%0d",
             g_cfg[1].in_q.size(), g_cfg[1].exp_q.size(), g_cfg[2].in_q.size(), g_cfg[2].exp_q.size(),
             g_cfg[3].in_q.size(), g_cfg[3].exp_q.size(), g_cfg[4].in_q.size(), g_cfg[4].exp_q.size(),
             g_cfg[5].in_q.size(), g_cfg[5].exp_q.size(), g_cfg[6].in_q.size(), g_cfg[6].exp_q.size(),
             g_cfg[7].in_q.size(), g_cfg[7].exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
