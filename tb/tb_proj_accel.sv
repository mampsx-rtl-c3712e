// tb_proj_accel: projection / centre-finding accelerator, 120x45 images, C=16.
//
// Frames: a 3x4 grid of eroded rectangles (12 centres, 4 padding tokens), a
// 5x4 grid (20 centres, only the first 16 sent), and a sparse random image.
// The C tokens of each frame are compared with the reference model. Frame 0
// runs with source and sink always ready and checks the frame time,
// H*(RW+2) + (H+1) + (W+1) + C cycles plus start-up.
module tb_proj_accel;
  import mampsx_pkg::*;
  import ffos_model_pkg::*;

  localparam int W = IMG_W, H = IMG_H, C = 16, AW = 4, NF = 3, RW = (W + 31) / 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic iv = 0, ir, ov, orr = 0;
  word_t id = 0, od;
  logic in_cd_req, in_cd_gnt, in_rd_req;
  logic [AW:0] in_cd_n, in_rd_n, in_ready;
  logic [AW-1:0] in_rd_off, out_wr_off;
  word_t in_rd_data, out_wr_data;
  logic out_cs_req, out_cs_gnt, out_wr_en, out_rs_req, frame_done;
  logic [AW:0] out_cs_n, out_rs_n, out_free;

  ca_rx #(.DEPTH(16), .TOKEN_WORDS(1)) u_in (.clk, .rst_n, .s_tvalid(iv), .s_tready(ir),
    .s_tdata(id), .cd_req(in_cd_req), .cd_n(in_cd_n), .cd_gnt(in_cd_gnt),
    .rd_off(in_rd_off), .rd_data(in_rd_data), .rd_req(in_rd_req), .rd_n(in_rd_n),
    .ready_words(in_ready));
  proj_accel dut (.clk, .rst_n,
    .in_cd_req, .in_cd_n, .in_cd_gnt, .in_rd_off, .in_rd_data, .in_rd_req, .in_rd_n,
    .in_ready_words(in_ready),
    .out_cs_req, .out_cs_n, .out_cs_gnt, .out_wr_en, .out_wr_off, .out_wr_data,
    .out_rs_req, .out_rs_n, .out_free_words(out_free), .frame_done);
  ca_tx #(.DEPTH(16), .TOKEN_WORDS(1)) u_out (.clk, .rst_n,
    .cs_req(out_cs_req), .cs_n(out_cs_n), .cs_gnt(out_cs_gnt), .wr_en(out_wr_en),
    .wr_off(out_wr_off), .wr_data(out_wr_data), .rs_req(out_rs_req), .rs_n(out_rs_n),
    .free_words(out_free), .m_tvalid(ov), .m_tready(orr), .m_tdata(od));

  int checks = 0, failures = 0, frames = 0, pads = 0;
  bit rnd = 0;
  bit [31:0] in_q[$], exp_q[$];
  longint cyc = 0, t_first = -1, t_done = -1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (iv && ir) begin void'(in_q.pop_front()); if (t_first < 0) t_first <= cyc; end
      if (ov && orr) begin
        check(exp_q.size() > 0 && od == exp_q[0], "centre token");
        if (od != exp_q[0]) $display("  got %h expected %h", od, exp_q[0]);
        if (od == 32'h0000_FFFF) pads <= pads + 1;
        void'(exp_q.pop_front());
      end
      if (frame_done) begin frames <= frames + 1; if (t_done < 0) t_done <= cyc; end
    end
  end

  always @(negedge clk) begin
    iv = in_q.size() > 0 && (!rnd || $urandom_range(0, 3) != 0);
    id = in_q.size() > 0 ? in_q[0] : 0;
    orr = !rnd || $urandom_range(0, 2) != 0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      automatic bitimg_t img;
      automatic bit [31:0] pix[$];
      automatic words_t wi, ex;
      if (f < 2) begin
        wafer(pix, W, H, f == 0 ? 3 : 5, 4, 0, 11);
        img = erode(binarise(pix, 128), W, H);
      end else begin
        for (int i = 0; i < W * H; i++) img.push_back($urandom_range(0, 60) == 0);
      end
      wi = pack(img, W, H);
      ex = centres(img, W, H, C);
      foreach (ex[i]) exp_q.push_back(ex[i]);
      foreach (wi[i]) in_q.push_back(wi[i]);
      wait (frames == f + 1 && exp_q.size() == 0);
      if (f == 0) begin
        $display("frame 0: %0d cycles", t_done - t_first);
        check(t_done - t_first <= H * (RW + 2) + (H + 1) + (W + 1) + C + 4, "frame time");
        rnd = 1;
      end
    end
    check(pads > 0, "padding tokens seen");
    $display("frames=%0d padding tokens=%0d", frames, pads);
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
