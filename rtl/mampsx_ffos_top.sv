// mampsx_ffos_top: generated accelerator platform for the FFoS application.
//
// The FFoS chain finds the centres of OLED structures in a grey image:
// Otsu threshold (software) -> binarisation -> erosion -> projection. Each of
// the last three actors runs either in software on the processor tile or on
// its own accelerator tile; the parameters PROJ_HW, EROS_HW, BIN_HW select the
// configuration (Proj, Eros, Bin) and default to (1, 1, 1), all three in
// hardware. Every dataflow channel with at least one end on an accelerator
// gets its own AXI-stream FIFO link, and every accelerator talks to the links
// only through communication assists (ca_rx at its inputs, ca_tx at its
// outputs) built on C-HEAP circular buffers. This decouples computation from
// communication. In configuration (1,1,1):
//
//   ARM tile --D1 pixels-----> FIFO --> ca_rx --+
//   ARM tile --D3 threshold--> FIFO --> ca_rx --+-> bin_accel  -> ca_tx --D4--> FIFO
//      --> ca_rx -> eros_accel -> ca_tx --D5--> FIFO
//      --> ca_rx -> proj_accel -> ca_tx --D6--> FIFO --> ARM tile (centres)
//
// When an actor is in software, the links of its channels end at processor
// ports instead: D4 leaves on m_d4 (Bin in hardware, Eros in software) or
// enters on s_d4 (Bin in software, Eros in hardware), and likewise D5. Ports
// of channels that the configuration does not route are idle (valid and ready
// low). The processor tile (source, Otsu and sink actors, software actors,
// its DMA-based assist and its memories) is outside this module.
// All tokens on these channels are at most 32 bits, so each assist moves
// one-word tokens. Link depth and latency default to the example platform's
// FIFO links: latency 3 on links towards an accelerator (its first link) and
// 6 on links back into the processor tile (its second link); the buffer depth of 16 words is this design's choice (it
// must hold the three image rows the erosion window needs). The per-channel
// links follow the document's mapping, the software-side port names are this
// design's.
// Timing: with fast enough input, one 120x45 frame passes the chain in about
// 3*W*H cycles, limited by the one-word, three-cycle links.
module mampsx_ffos_top
  import mampsx_pkg::*;
#(
  parameter int unsigned W          = IMG_W,
  parameter int unsigned H          = IMG_H,
  parameter int unsigned C          = 16,
  parameter int unsigned FIFO_DEPTH = 1,
  parameter int unsigned FIFO_LAT   = 3,   // links towards an accelerator
  parameter int unsigned FIFO_LAT_RET = 6, // links into the processor tile
  parameter int unsigned BUF_DEPTH  = 16,
  parameter bit          PROJ_HW    = 1'b1,
  parameter bit          EROS_HW    = 1'b1,
  parameter bit          BIN_HW     = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  // D1: grey pixels from the processor tile, one per word, raster order
  input  logic  s_pix_tvalid,
  output logic  s_pix_tready,
  input  word_t s_pix_tdata,
  // D3: one binarisation threshold per frame from the processor tile
  input  logic  s_thr_tvalid,
  output logic  s_thr_tready,
  input  word_t s_thr_tdata,
  // D6: C centre tokens per frame to the processor tile
  output logic  m_ctr_tvalid,
  input  logic  m_ctr_tready,
  output word_t m_ctr_tdata,
  // D4 / D5 to and from software actors on the processor tile
  output logic  m_d4_tvalid,
  input  logic  m_d4_tready,
  output word_t m_d4_tdata,
  input  logic  s_d4_tvalid,
  output logic  s_d4_tready,
  input  word_t s_d4_tdata,
  output logic  m_d5_tvalid,
  input  logic  m_d5_tready,
  output word_t m_d5_tdata,
  input  logic  s_d5_tvalid,
  output logic  s_d5_tready,
  input  word_t s_d5_tdata,
  // one-cycle pulses when an accelerator has finished a frame
  output logic  bin_done,
  output logic  eros_done,
  output logic  proj_done
);

  localparam int unsigned AW = $clog2(BUF_DEPTH);

  // one request/grant bundle per buffer side, named after the channel
  typedef struct packed {
    logic          cd_req;
    logic [AW:0]   cd_n;
    logic [AW-1:0] rd_off;
    logic          rd_req;
    logic [AW:0]   rd_n;
  } cons_req_t;
  typedef struct packed {
    logic          cd_gnt;
    word_t         rd_data;
    logic [AW:0]   ready_words;
  } cons_rsp_t;
  typedef struct packed {
    logic          cs_req;
    logic [AW:0]   cs_n;
    logic          wr_en;
    logic [AW-1:0] wr_off;
    word_t         wr_data;
    logic          rs_req;
    logic [AW:0]   rs_n;
  } prod_req_t;
  typedef struct packed {
    logic          cs_gnt;
    logic [AW:0]   free_words;
  } prod_rsp_t;

  // stream wires after each link (link outputs)
  logic  d1_v, d1_r, d3_v, d3_r, d4_v, d4_r, d5_v, d5_r;
  word_t d1_d, d3_d, d4_d, d5_d;
  // stream wires before each link (link inputs)
  logic  l4_v, l4_r, l5_v, l5_r;
  word_t l4_d, l5_d;
  // accelerator assist outputs
  logic  b_v, b_r, e_v, e_r, p_v, p_r;
  word_t b_d, e_d, p_d;

  cons_req_t pix_q, thr_q, ein_q, pin_q;
  cons_rsp_t pix_s, thr_s, ein_s, pin_s;
  prod_req_t bout_q, eout_q, pout_q;
  prod_rsp_t bout_s, eout_s, pout_s;

  // ---------------- binarisation tile and its input links ---------------
  if (BIN_HW) begin : g_bin
    axis_fifo #(.DEPTH(FIFO_DEPTH), .LATENCY(FIFO_LAT)) u_link_d1 (
      .clk, .rst_n,
      .s_tvalid(s_pix_tvalid), .s_tready(s_pix_tready), .s_tdata(s_pix_tdata),
      .m_tvalid(d1_v), .m_tready(d1_r), .m_tdata(d1_d));
    axis_fifo #(.DEPTH(FIFO_DEPTH), .LATENCY(FIFO_LAT)) u_link_d3 (
      .clk, .rst_n,
      .s_tvalid(s_thr_tvalid), .s_tready(s_thr_tready), .s_tdata(s_thr_tdata),
      .m_tvalid(d3_v), .m_tready(d3_r), .m_tdata(d3_d));

    ca_rx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_bin_ca_pix (
      .clk, .rst_n,
      .s_tvalid(d1_v), .s_tready(d1_r), .s_tdata(d1_d),
      .cd_req(pix_q.cd_req), .cd_n(pix_q.cd_n), .cd_gnt(pix_s.cd_gnt),
      .rd_off(pix_q.rd_off), .rd_data(pix_s.rd_data),
      .rd_req(pix_q.rd_req), .rd_n(pix_q.rd_n), .ready_words(pix_s.ready_words));
    ca_rx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_bin_ca_thr (
      .clk, .rst_n,
      .s_tvalid(d3_v), .s_tready(d3_r), .s_tdata(d3_d),
      .cd_req(thr_q.cd_req), .cd_n(thr_q.cd_n), .cd_gnt(thr_s.cd_gnt),
      .rd_off(thr_q.rd_off), .rd_data(thr_s.rd_data),
      .rd_req(thr_q.rd_req), .rd_n(thr_q.rd_n), .ready_words(thr_s.ready_words));

    bin_accel #(.W(W), .H(H), .IN_AW(AW), .OUT_AW(AW)) u_bin (
      .clk, .rst_n,
      .thr_cd_req(thr_q.cd_req), .thr_cd_n(thr_q.cd_n), .thr_cd_gnt(thr_s.cd_gnt),
      .thr_rd_off(thr_q.rd_off), .thr_rd_data(thr_s.rd_data),
      .thr_rd_req(thr_q.rd_req), .thr_rd_n(thr_q.rd_n),
      .pix_cd_req(pix_q.cd_req), .pix_cd_n(pix_q.cd_n), .pix_cd_gnt(pix_s.cd_gnt),
      .pix_rd_off(pix_q.rd_off), .pix_rd_data(pix_s.rd_data),
      .pix_rd_req(pix_q.rd_req), .pix_rd_n(pix_q.rd_n),
      .pix_ready_words(pix_s.ready_words),
      .out_cs_req(bout_q.cs_req), .out_cs_n(bout_q.cs_n), .out_cs_gnt(bout_s.cs_gnt),
      .out_wr_en(bout_q.wr_en), .out_wr_off(bout_q.wr_off), .out_wr_data(bout_q.wr_data),
      .out_rs_req(bout_q.rs_req), .out_rs_n(bout_q.rs_n),
      .out_free_words(bout_s.free_words),
      .frame_done(bin_done));

    ca_tx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_bin_ca_out (
      .clk, .rst_n,
      .cs_req(bout_q.cs_req), .cs_n(bout_q.cs_n), .cs_gnt(bout_s.cs_gnt),
      .wr_en(bout_q.wr_en), .wr_off(bout_q.wr_off), .wr_data(bout_q.wr_data),
      .rs_req(bout_q.rs_req), .rs_n(bout_q.rs_n), .free_words(bout_s.free_words),
      .m_tvalid(b_v), .m_tready(b_r), .m_tdata(b_d));
  end else begin : g_no_bin
    assign s_pix_tready = 1'b0;
    assign s_thr_tready = 1'b0;
    assign b_v          = 1'b0;
    assign b_d          = '0;
    assign bin_done     = 1'b0;
  end

  // ---------------- D4 link: Bin -> Eros --------------------------------
  // source: Bin's assist, or the processor when Bin is in software
  assign l4_v        = BIN_HW ? b_v : s_d4_tvalid;
  assign l4_d        = BIN_HW ? b_d : s_d4_tdata;
  assign b_r         = l4_r;
  assign s_d4_tready = (!BIN_HW && EROS_HW) ? l4_r : 1'b0;
  // sink: Eros's assist, or the processor when Eros is in software
  assign m_d4_tvalid = (BIN_HW && !EROS_HW) ? d4_v : 1'b0;
  assign m_d4_tdata  = (BIN_HW && !EROS_HW) ? d4_d : '0;

  if (BIN_HW || EROS_HW) begin : g_link_d4
    axis_fifo #(.DEPTH(FIFO_DEPTH), .LATENCY(EROS_HW ? FIFO_LAT : FIFO_LAT_RET)) u_link_d4 (
      .clk, .rst_n,
      .s_tvalid(l4_v), .s_tready(l4_r), .s_tdata(l4_d),
      .m_tvalid(d4_v), .m_tready(d4_r), .m_tdata(d4_d));
  end else begin : g_no_link_d4
    assign l4_r = 1'b0;
    assign d4_v = 1'b0;
    assign d4_d = '0;
  end

  // ---------------- erosion tile ----------------------------------------
  if (EROS_HW) begin : g_eros
    ca_rx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_eros_ca_in (
      .clk, .rst_n,
      .s_tvalid(d4_v), .s_tready(d4_r), .s_tdata(d4_d),
      .cd_req(ein_q.cd_req), .cd_n(ein_q.cd_n), .cd_gnt(ein_s.cd_gnt),
      .rd_off(ein_q.rd_off), .rd_data(ein_s.rd_data),
      .rd_req(ein_q.rd_req), .rd_n(ein_q.rd_n), .ready_words(ein_s.ready_words));

    eros_accel #(.W(W), .H(H), .IN_AW(AW), .OUT_AW(AW)) u_eros (
      .clk, .rst_n,
      .in_cd_req(ein_q.cd_req), .in_cd_n(ein_q.cd_n), .in_cd_gnt(ein_s.cd_gnt),
      .in_rd_off(ein_q.rd_off), .in_rd_data(ein_s.rd_data),
      .in_rd_req(ein_q.rd_req), .in_rd_n(ein_q.rd_n),
      .in_ready_words(ein_s.ready_words),
      .out_cs_req(eout_q.cs_req), .out_cs_n(eout_q.cs_n), .out_cs_gnt(eout_s.cs_gnt),
      .out_wr_en(eout_q.wr_en), .out_wr_off(eout_q.wr_off), .out_wr_data(eout_q.wr_data),
      .out_rs_req(eout_q.rs_req), .out_rs_n(eout_q.rs_n),
      .out_free_words(eout_s.free_words),
      .frame_done(eros_done));

    ca_tx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_eros_ca_out (
      .clk, .rst_n,
      .cs_req(eout_q.cs_req), .cs_n(eout_q.cs_n), .cs_gnt(eout_s.cs_gnt),
      .wr_en(eout_q.wr_en), .wr_off(eout_q.wr_off), .wr_data(eout_q.wr_data),
      .rs_req(eout_q.rs_req), .rs_n(eout_q.rs_n), .free_words(eout_s.free_words),
      .m_tvalid(e_v), .m_tready(e_r), .m_tdata(e_d));
  end else begin : g_no_eros
    // D4 ends at the processor instead
    assign d4_r      = BIN_HW ? m_d4_tready : 1'b0;
    assign e_v       = 1'b0;
    assign e_d       = '0;
    assign eros_done = 1'b0;
  end

  // ---------------- D5 link: Eros -> Proj -------------------------------
  assign l5_v        = EROS_HW ? e_v : s_d5_tvalid;
  assign l5_d        = EROS_HW ? e_d : s_d5_tdata;
  assign e_r         = l5_r;
  assign s_d5_tready = (!EROS_HW && PROJ_HW) ? l5_r : 1'b0;
  assign m_d5_tvalid = (EROS_HW && !PROJ_HW) ? d5_v : 1'b0;
  assign m_d5_tdata  = (EROS_HW && !PROJ_HW) ? d5_d : '0;

  if (EROS_HW || PROJ_HW) begin : g_link_d5
    axis_fifo #(.DEPTH(FIFO_DEPTH), .LATENCY(PROJ_HW ? FIFO_LAT : FIFO_LAT_RET)) u_link_d5 (
      .clk, .rst_n,
      .s_tvalid(l5_v), .s_tready(l5_r), .s_tdata(l5_d),
      .m_tvalid(d5_v), .m_tready(d5_r), .m_tdata(d5_d));
  end else begin : g_no_link_d5
    assign l5_r = 1'b0;
    assign d5_v = 1'b0;
    assign d5_d = '0;
  end

  // ---------------- projection tile and its output link -----------------
  if (PROJ_HW) begin : g_proj
    ca_rx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_proj_ca_in (
      .clk, .rst_n,
      .s_tvalid(d5_v), .s_tready(d5_r), .s_tdata(d5_d),
      .cd_req(pin_q.cd_req), .cd_n(pin_q.cd_n), .cd_gnt(pin_s.cd_gnt),
      .rd_off(pin_q.rd_off), .rd_data(pin_s.rd_data),
      .rd_req(pin_q.rd_req), .rd_n(pin_q.rd_n), .ready_words(pin_s.ready_words));

    proj_accel #(.W(W), .H(H), .C(C), .IN_AW(AW), .OUT_AW(AW)) u_proj (
      .clk, .rst_n,
      .in_cd_req(pin_q.cd_req), .in_cd_n(pin_q.cd_n), .in_cd_gnt(pin_s.cd_gnt),
      .in_rd_off(pin_q.rd_off), .in_rd_data(pin_s.rd_data),
      .in_rd_req(pin_q.rd_req), .in_rd_n(pin_q.rd_n),
      .in_ready_words(pin_s.ready_words),
      .out_cs_req(pout_q.cs_req), .out_cs_n(pout_q.cs_n), .out_cs_gnt(pout_s.cs_gnt),
      .out_wr_en(pout_q.wr_en), .out_wr_off(pout_q.wr_off), .out_wr_data(pout_q.wr_data),
      .out_rs_req(pout_q.rs_req), .out_rs_n(pout_q.rs_n),
      .out_free_words(pout_s.free_words),
      .frame_done(proj_done));

    ca_tx #(.DEPTH(BUF_DEPTH), .TOKEN_WORDS(1)) u_proj_ca_out (
      .clk, .rst_n,
      .cs_req(pout_q.cs_req), .cs_n(pout_q.cs_n), .cs_gnt(pout_s.cs_gnt),
      .wr_en(pout_q.wr_en), .wr_off(pout_q.wr_off), .wr_data(pout_q.wr_data),
      .rs_req(pout_q.rs_req), .rs_n(pout_q.rs_n), .free_words(pout_s.free_words),
      .m_tvalid(p_v), .m_tready(p_r), .m_tdata(p_d));

    axis_fifo #(.DEPTH(FIFO_DEPTH), .LATENCY(FIFO_LAT_RET)) u_link_d6 (
      .clk, .rst_n,
      .s_tvalid(p_v), .s_tready(p_r), .s_tdata(p_d),
      .m_tvalid(m_ctr_tvalid), .m_tready(m_ctr_tready), .m_tdata(m_ctr_tdata));
  end else begin : g_no_proj
    // D5 ends at the processor instead
    assign d5_r         = EROS_HW ? m_d5_tready : 1'b0;
    assign m_ctr_tvalid = 1'b0;
    assign m_ctr_tdata  = '0;
    assign proj_done    = 1'b0;
  end

endmodule
