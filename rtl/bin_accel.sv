// bin_accel: binarisation accelerator of the FFoS vision application.
//
// Per frame it first claims one threshold token (computed elsewhere by the
// Otsu step) from its threshold assist, then consumes W*H pixel tokens, one
// 32-bit grey value each, in raster order. A pixel becomes 1 when its value is
// above the threshold, else 0. Output bits are packed into 32-bit words, row
// by row: bit k of word j of a row is pixel 32*j+k, and each row starts a new
// word (ceil(W/32) words per row, 4 for W=120).
//
// Both inputs are used through the C-HEAP primitives of their receiving
// assists: claim one token, read it at offset 0 and release it in the same
// cycle. A finished output word is written with claim space, write and release
// space in one cycle. The accelerator stalls while a pixel is missing, or when
// a word is complete and the sending assist has no free space.
// Throughput: one pixel per cycle, so a 120x45 frame takes W*H = 5400 cycles
// plus one cycle for the threshold when no input is missing.
// The function (threshold binarisation, one bit per pixel) follows the
// document; "above the threshold is 1", the packing and the interface timing
// are this design's choices.
module bin_accel
  import mampsx_pkg::*;
#(
  parameter int unsigned W     = IMG_W,
  parameter int unsigned H     = IMG_H,
  parameter int unsigned IN_AW = 4,     // address width of the input buffers
  parameter int unsigned OUT_AW = 4     // address width of the output buffer
) (
  input  logic              clk,
  input  logic              rst_n,
  // threshold input (consumer side of a ca_rx)
  output logic              thr_cd_req,
  output logic [IN_AW:0]    thr_cd_n,
  input  logic              thr_cd_gnt,
  output logic [IN_AW-1:0]  thr_rd_off,
  input  word_t             thr_rd_data,
  output logic              thr_rd_req,
  output logic [IN_AW:0]    thr_rd_n,
  // pixel input (consumer side of a ca_rx)
  output logic              pix_cd_req,
  output logic [IN_AW:0]    pix_cd_n,
  input  logic              pix_cd_gnt,     // always granted when requested
  output logic [IN_AW-1:0]  pix_rd_off,
  input  word_t             pix_rd_data,
  output logic              pix_rd_req,
  output logic [IN_AW:0]    pix_rd_n,
  input  logic [IN_AW:0]    pix_ready_words,
  // packed binary output (producer side of a ca_tx)
  output logic              out_cs_req,
  output logic [OUT_AW:0]   out_cs_n,
  input  logic              out_cs_gnt,
  output logic              out_wr_en,
  output logic [OUT_AW-1:0] out_wr_off,
  output word_t             out_wr_data,
  output logic              out_rs_req,
  output logic [OUT_AW:0]   out_rs_n,
  input  logic [OUT_AW:0]   out_free_words,
  // one pulse per finished frame
  output logic              frame_done
);

  localparam int unsigned XW = $clog2(W + 1);
  localparam int unsigned YW = $clog2(H + 1);

  typedef enum logic {S_THR, S_PIX} state_e;
  state_e         state;
  word_t          thr;
  word_t          acc;          // output word being filled
  logic [XW-1:0]  x;
  logic [YW-1:0]  y;
  logic [4:0]     bit_pos;
  logic           word_full, need_out, pix_bit, step;

  assign pix_bit   = (pix_rd_data > thr);
  assign word_full = (bit_pos == 5'd31) || (x == XW'(W - 1));
  assign need_out  = word_full;

  // threshold: claim, read and release one token per frame
  assign thr_cd_req = (state == S_THR);
  assign thr_cd_n   = (IN_AW+1)'(1);
  assign thr_rd_off = '0;
  assign thr_rd_req = thr_cd_gnt;
  assign thr_rd_n   = (IN_AW+1)'(1);

  // A pixel is taken when one is ready and, if it completes an output word,
  // the sending assist has a free word. Claims are then always granted.
  assign step       = (state == S_PIX) && (pix_ready_words != '0) &&
                      (!need_out || out_free_words != '0);
  assign pix_cd_req = step;
  assign pix_cd_n   = (IN_AW+1)'(1);
  assign pix_rd_off = '0;
  assign pix_rd_req = step;
  assign pix_rd_n   = (IN_AW+1)'(1);

  assign out_cs_req  = step && need_out;
  assign out_cs_n    = (OUT_AW+1)'(1);
  assign out_wr_en   = step && need_out;
  assign out_wr_off  = '0;
  assign out_wr_data = acc | (word_t'(pix_bit) << bit_pos);
  assign out_rs_req  = out_wr_en;
  assign out_rs_n    = (OUT_AW+1)'(1);

  // The status checks above imply the grants.
  a_grant : assert property (@(posedge clk) disable iff (!rst_n)
      step |-> pix_cd_gnt && (!need_out || out_cs_gnt))
    else $error("bin_accel: claim refused despite status");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_THR;
      thr        <= '0;
      acc        <= '0;
      x          <= '0;
      y          <= '0;
      bit_pos    <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_THR: if (thr_cd_gnt) begin
          thr   <= thr_rd_data;
          state <= S_PIX;
        end
        S_PIX: if (step) begin
          if (word_full) begin
            acc     <= '0;
            bit_pos <= '0;
          end else begin
            acc     <= out_wr_data;
            bit_pos <= bit_pos + 1'b1;
          end
          if (x == XW'(W - 1)) begin
            x <= '0;
            if (y == YW'(H - 1)) begin
              y          <= '0;
              state      <= S_THR;
              frame_done <= 1'b1;
            end else begin
              y <= y + 1'b1;
            end
          end else begin
            x <= x + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
