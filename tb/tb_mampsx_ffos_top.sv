// tb_mampsx_ffos_top: end-to-end run of the FFoS accelerator platform at its
// default size (120x45 pixels, 16 centres, one-word links of latency 3).
//
// The testbench plays the processor tile: it streams the grey pixels and one
// threshold per frame and collects the centre tokens. Four frames, queued at
// once: 3x4 grids of structures with salt noise (fewer centres than 16, so
// padding) and one 5x4 grid (more than 16, so truncation). After frame 1 the
// sink stops until the whole chain has backed up, then drains slowly. Every centre token is compared with the reference model
// (binarise, erode, project). Mechanisms counted, each must occur: link
// back-pressure, a full receiving buffer, the binarisation waiting for pixels,
// an accelerator waiting for output space, erosion window re-reads, sink
// back-pressure, padding and truncation of the centre list, and a completed
// frame in each accelerator.
module tb_mampsx_ffos_top;
  import mampsx_pkg::*;
  import ffos_model_pkg::*;

  localparam int W = IMG_W, H = IMG_H, C = 16, NF = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s_pix_tvalid = 0, s_pix_tready, s_thr_tvalid = 0, s_thr_tready;
  logic m_ctr_tvalid, m_ctr_tready = 0, bin_done, eros_done, proj_done;
  word_t s_pix_tdata = 0, s_thr_tdata = 0, m_ctr_tdata;
  // D4/D5 processor ports: unused in the default configuration
  logic m_d4_tvalid, m_d4_tready = 0, s_d4_tvalid = 0, s_d4_tready;
  logic m_d5_tvalid, m_d5_tready = 0, s_d5_tvalid = 0, s_d5_tready;
  word_t m_d4_tdata, s_d4_tdata = 0, m_d5_tdata, s_d5_tdata = 0;

  mampsx_ffos_top dut (.*);

  int checks = 0, failures = 0, frames = 0;
  bit slow = 0;
  bit [31:0] pix_q[$], thr_q[$], exp_q[$];
  // mechanism counters
  int n_link_bp = 0, n_buf_full = 0, n_pix_wait = 0, n_out_wait = 0, n_reread = 0;
  int n_sink_bp = 0, n_pad = 0, n_trunc = 0, n_bin = 0, n_eros = 0, n_proj = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (s_pix_tvalid && s_pix_tready) void'(pix_q.pop_front());
    if (s_thr_tvalid && s_thr_tready) void'(thr_q.pop_front());
    if (m_ctr_tvalid && m_ctr_tready) begin
      check(exp_q.size() > 0 && m_ctr_tdata == exp_q[0], "centre token");
      if (exp_q.size() > 0 && m_ctr_tdata != exp_q[0])
        $display("  got %h expected %h", m_ctr_tdata, exp_q[0]);
      if (m_ctr_tdata == 32'h0000_FFFF) n_pad++;
      void'(exp_q.pop_front());
    end
    if (m_ctr_tvalid && !m_ctr_tready) n_sink_bp++;
    if (s_pix_tvalid && !s_pix_tready) n_link_bp++;
    if (dut.d1_v && !dut.d1_r) n_buf_full++;
    if (dut.g_bin.u_bin.state == 1 && dut.pix_s.ready_words == 0) n_pix_wait++;
    if ((dut.g_bin.u_bin.state == 1 && dut.g_bin.u_bin.need_out && dut.bout_s.free_words == 0) ||
        (dut.g_eros.u_eros.state == 2 && !dut.eout_q.cs_req) ||
        (dut.g_proj.u_proj.state == 5 && !dut.pout_q.cs_req)) n_out_wait++;
    if (dut.g_eros.u_eros.state == 1 && dut.g_eros.u_eros.rr_in && dut.g_eros.u_eros.r != 0 && dut.g_eros.u_eros.dy != 2)
      n_reread++;
    if (dut.g_proj.u_proj.state == 5 && dut.g_proj.u_proj.k == 0 && dut.pout_q.cs_req &&
        dut.g_proj.u_proj.nr * dut.g_proj.u_proj.nc > C) n_trunc++;
    if (bin_done) n_bin++;
    if (eros_done) n_eros++;
    if (proj_done) begin n_proj++; frames <= frames + 1; end
  end

  always @(negedge clk) begin
    s_pix_tvalid = pix_q.size() > 0;
    s_pix_tdata  = pix_q.size() > 0 ? pix_q[0] : 0;
    s_thr_tvalid = thr_q.size() > 0;
    s_thr_tdata  = thr_q.size() > 0 ? thr_q[0] : 0;
    // from the end of frame 1 the sink stops until the whole chain has backed
    // up into the pixel buffer, then takes one token in about ten cycles
    slow = (n_proj >= 2);
    m_ctr_tready = !slow || (n_buf_full > 50 && $urandom_range(0, 9) == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      automatic bit [31:0] pix[$];
      automatic bit [31:0] thr = 120 + 10 * f;
      automatic words_t ex;
      wafer(pix, W, H, f == 1 ? 5 : 3, 4, 50, 100 + f);
      ex = centres(erode(binarise(pix, thr), W, H), W, H, C);
      foreach (ex[i]) exp_q.push_back(ex[i]);
      thr_q.push_back(thr);
      foreach (pix[i]) pix_q.push_back(pix[i]);
    end
    wait (frames == NF && exp_q.size() == 0);
    $display("%0d frames done at cycle %0d", NF, $time / 10);
    check(n_bin == NF && n_eros == NF && n_proj == NF, "every accelerator finished every frame");
    check(!m_d4_tvalid && !m_d5_tvalid && !s_d4_tready && !s_d5_tready,
          "processor D4/D5 ports idle in configuration (1,1,1)");
    check(n_link_bp > 0, "link back-pressure");
    check(n_buf_full > 0, "full receiving buffer");
    check(n_pix_wait > 0, "binarisation waiting for pixels");
    check(n_out_wait > 0, "accelerator waiting for output space");
    check(n_reread > 0, "erosion window re-reads");
    check(n_sink_bp > 0, "sink back-pressure");
    check(n_pad > 0, "centre list padding");
    check(n_trunc > 0, "centre list truncation");
    $display("link bp=%0d buf full=%0d pix wait=%0d out wait=%0d rereads=%0d sink bp=%0d pad=%0d trunc=%0d",
             n_link_bp, n_buf_full, n_pix_wait, n_out_wait, n_reread, n_sink_bp, n_pad, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
