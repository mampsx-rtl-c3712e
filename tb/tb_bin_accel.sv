// tb_bin_accel: binarisation accelerator between its assists.
//
// Two receiving assists (threshold, pixels) feed bin_accel, whose sending
// assist drives a sink. Three frames of a 40x6 image (two words per row, the
// second one partly used) are sent with different thresholds. Frame 0 runs
// with source and sink always ready and checks the rate of one pixel per
// cycle; frames 1 and 2 use random valid/ready so the accelerator stalls on
// missing pixels and on a full output buffer. Output words are compared with
// the reference model (pixel > threshold, row-aligned packing).
module tb_bin_accel;
  import mampsx_pkg::*;
  import ffos_model_pkg::*;

  localparam int W = 40, H = 6, AW = 4, NF = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // streams
  logic pv = 0, pr, tv = 0, tr, ov, orr = 0;
  word_t pd = 0, td = 0, od;
  // buffer sides
  logic thr_cd_req, thr_cd_gnt, thr_rd_req, pix_cd_req, pix_cd_gnt, pix_rd_req;
  logic [AW:0] thr_cd_n, thr_rd_n, pix_cd_n, pix_rd_n, thr_ready, pix_ready;
  logic [AW-1:0] thr_rd_off, pix_rd_off, out_wr_off;
  word_t thr_rd_data, pix_rd_data, out_wr_data;
  logic out_cs_req, out_cs_gnt, out_wr_en, out_rs_req, frame_done;
  logic [AW:0] out_cs_n, out_rs_n, out_free;

  ca_rx #(.DEPTH(16), .TOKEN_WORDS(1)) u_thr (.clk, .rst_n, .s_tvalid(tv), .s_tready(tr),
    .s_tdata(td), .cd_req(thr_cd_req), .cd_n(thr_cd_n), .cd_gnt(thr_cd_gnt),
    .rd_off(thr_rd_off), .rd_data(thr_rd_data), .rd_req(thr_rd_req), .rd_n(thr_rd_n),
    .ready_words(thr_ready));
  ca_rx #(.DEPTH(16), .TOKEN_WORDS(1)) u_pix (.clk, .rst_n, .s_tvalid(pv), .s_tready(pr),
    .s_tdata(pd), .cd_req(pix_cd_req), .cd_n(pix_cd_n), .cd_gnt(pix_cd_gnt),
    .rd_off(pix_rd_off), .rd_data(pix_rd_data), .rd_req(pix_rd_req), .rd_n(pix_rd_n),
    .ready_words(pix_ready));
  bin_accel #(.W(W), .H(H)) dut (.clk, .rst_n,
    .thr_cd_req, .thr_cd_n, .thr_cd_gnt, .thr_rd_off, .thr_rd_data, .thr_rd_req, .thr_rd_n,
    .pix_cd_req, .pix_cd_n, .pix_cd_gnt, .pix_rd_off, .pix_rd_data, .pix_rd_req, .pix_rd_n,
    .pix_ready_words(pix_ready),
    .out_cs_req, .out_cs_n, .out_cs_gnt, .out_wr_en, .out_wr_off, .out_wr_data,
    .out_rs_req, .out_rs_n, .out_free_words(out_free), .frame_done);
  ca_tx #(.DEPTH(16), .TOKEN_WORDS(1)) u_out (.clk, .rst_n,
    .cs_req(out_cs_req), .cs_n(out_cs_n), .cs_gnt(out_cs_gnt), .wr_en(out_wr_en),
    .wr_off(out_wr_off), .wr_data(out_wr_data), .rs_req(out_rs_req), .rs_n(out_rs_n),
    .free_words(out_free), .m_tvalid(ov), .m_tready(orr), .m_tdata(od));

  int checks = 0, failures = 0, stalls = 0, frames = 0;
  bit rnd = 0;
  bit [31:0] pix_q[$], thr_q[$], exp_q[$];
  longint cyc = 0, t_first = -1, t_done = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (pv && pr) begin void'(pix_q.pop_front()); if (t_first < 0) t_first <= cyc; end
      if (tv && tr) void'(thr_q.pop_front());
      if (ov && orr) begin
        check(exp_q.size() > 0 && od == exp_q[0], "output word"); if (od != exp_q[0]) $display("  got %h exp %h", od, exp_q[0]);
        void'(exp_q.pop_front());
      end
      if (frame_done) begin frames <= frames + 1; if (t_done < 0) t_done <= cyc; end
      if (dut.state == 1 && pix_ready == 0) stalls <= stalls + 1;
    end
  end

  always @(negedge clk) begin
    pv = pix_q.size() > 0 && (!rnd || $urandom_range(0, 2) != 0);
    pd = pix_q.size() > 0 ? pix_q[0] : 0;
    tv = thr_q.size() > 0;
    td = thr_q.size() > 0 ? thr_q[0] : 0;
    orr = !rnd || $urandom_range(0, 3) == 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      automatic bit [31:0] pix[$];
      automatic bit [31:0] thr = (f == 0) ? 32'd100 : $urandom_range(50, 200);
      automatic words_t ex;
      for (int i = 0; i < W * H; i++) pix.push_back($urandom_range(0, 255));
      pix[0] = thr; pix[1] = thr + 1;   // the boundary: equal is 0, above is 1
      ex = pack(binarise(pix, thr), W, H);
      foreach (ex[i]) exp_q.push_back(ex[i]);
      thr_q.push_back(thr);
      foreach (pix[i]) pix_q.push_back(pix[i]);
      wait (frames == f + 1 && exp_q.size() == 0);
      if (f == 0) begin
        $display("frame 0: %0d cycles for %0d pixels", t_done - t_first, W * H);
        check(t_done - t_first <= W * H + 4, "one pixel per cycle");
        rnd = 1;
      end
    end
    check(stalls > 0, "stalls on missing pixels seen");
    $display("frames=%0d stall cycles=%0d", frames, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
