// eros_accel: erosion accelerator of the FFoS vision application.
//
// It removes noise from the binary image: an output pixel is 1 only when the
// pixel and all eight neighbours of its 3x3 square are 1. Pixels outside the
// image count as 0, so the outermost ring of the image is always cleared.
// Images arrive and leave packed as in bin_accel: RW = ceil(W/32) words per
// row, bit k of word j = pixel 32*j+k.
//
// The accelerator works on a sliding window in the receiving assist's
// circular buffer, using the C-HEAP primitives directly. For output row r it
// claims input rows until rows r-1..r+1 are in its claimed window, reads the
// 3*RW words it needs out of order (word offset (row-base)*RW + column word
// inside the window), computes the whole output row, claims RW words of output
// space, writes them and releases them, and then releases input row r-1, which
// no later row needs. At the end of a frame the remaining rows are released.
// The input buffer must therefore hold at least 3*RW words (12 for W=120).
// Timing per row: 3*RW read cycles, RW write cycles and four control cycles
// (claim, window check, output claim, release) when no data is missing: 20
// cycles per row, about 900 per 120x45 frame.
// The operation follows the document; the 3x3 square, the zero border and
// the row-at-a-time schedule are this design's choices.
module eros_accel
  import mampsx_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned IN_AW  = 4,
  parameter int unsigned OUT_AW = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // packed binary input (consumer side of a ca_rx)
  output logic              in_cd_req,
  output logic [IN_AW:0]    in_cd_n,
  input  logic              in_cd_gnt,
  output logic [IN_AW-1:0]  in_rd_off,
  input  word_t             in_rd_data,
  output logic              in_rd_req,
  output logic [IN_AW:0]    in_rd_n,
  input  logic [IN_AW:0]    in_ready_words,
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
  output logic              frame_done
);

  localparam int unsigned RW = row_words(W);
  localparam int unsigned YW = $clog2(H + 2) + 1;
  localparam int unsigned CW = (RW > 1) ? $clog2(RW) : 1;

  initial begin
    assert (3 * RW <= (1 << IN_AW))
      else $fatal(1, "eros_accel: input buffer cannot hold three rows");
    assert (RW <= (1 << OUT_AW))
      else $fatal(1, "eros_accel: output buffer cannot hold one row");
  end

  typedef enum logic [2:0] {S_CLAIM, S_READ, S_OCLAIM, S_WRITE, S_REL} state_e;
  state_e        state;
  logic [YW-1:0] r, base, hi;       // current row, row at read start, last row needed
  logic [1:0]    nrows;             // rows claimed in the window
  logic [1:0]    dy;                // window row being read (0: r-1, 1: r, 2: r+1)
  logic [CW-1:0] cw;                // word within a row
  word_t         win [3][RW];
  logic [W-1:0]  rowbits [3];
  logic [W-1:0]  ero;
  logic [YW-1:0] rr;                // image row read in S_READ
  logic          rr_in;

  assign hi    = (r == YW'(H - 1)) ? r : r + 1'b1;
  assign rr    = r + YW'(dy) - 1'b1;
  assign rr_in = (r != '0 || dy != '0) && (rr < YW'(H));

  // Unpack the window and erode one row.
  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int x = 0; x < W; x++)
        rowbits[i][x] = win[i][x / 32][x % 32];
    for (int x = 0; x < W; x++) begin
      ero[x] = 1'b1;
      for (int i = 0; i < 3; i++)
        for (int dx = -1; dx <= 1; dx++)
          ero[x] &= (x + dx >= 0 && x + dx < W) ? rowbits[i][x + dx] : 1'b0;
    end
  end

  // input side
  assign in_cd_req = (state == S_CLAIM) && (base + YW'(nrows) <= hi) &&
                     (in_ready_words >= (IN_AW+1)'(RW));
  assign in_cd_n   = (IN_AW+1)'(RW);
  assign in_rd_off = IN_AW'((rr - base) * YW'(RW) + YW'(cw));
  assign in_rd_req = (state == S_REL) && ((r == YW'(H - 1)) || (base < r));
  assign in_rd_n   = (r == YW'(H - 1)) ? (IN_AW+1)'(nrows * RW) : (IN_AW+1)'(RW);

  // output side
  assign out_cs_req  = (state == S_OCLAIM) && (out_free_words >= (OUT_AW+1)'(RW));
  assign out_cs_n    = (OUT_AW+1)'(RW);
  assign out_wr_en   = (state == S_WRITE);
  assign out_wr_off  = OUT_AW'(cw);
  always_comb begin
    out_wr_data = '0;
    for (int k = 0; k < 32; k++)
      if (32 * int'(cw) + k < W) out_wr_data[k] = ero[32 * int'(cw) + k];
  end
  assign out_rs_req  = (state == S_WRITE) && (cw == CW'(RW - 1));
  assign out_rs_n    = (OUT_AW+1)'(RW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CLAIM;
      r          <= '0;
      base       <= '0;
      nrows      <= '0;
      dy         <= '0;
      cw         <= '0;
      frame_done <= 1'b0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < RW; j++) win[i][j] <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_CLAIM: begin
          if (base + YW'(nrows) > hi) begin
            state <= S_READ;
            dy    <= '0;
            cw    <= '0;
          end else if (in_cd_gnt) begin
            nrows <= nrows + 1'b1;
          end
        end
        S_READ: begin
          win[dy][cw] <= rr_in ? in_rd_data : '0;
          if (cw == CW'(RW - 1)) begin
            cw <= '0;
            if (dy == 2'd2) state <= S_OCLAIM;
            else            dy    <= dy + 1'b1;
          end else begin
            cw <= cw + 1'b1;
          end
        end
        S_OCLAIM: if (out_cs_gnt) begin
          state <= S_WRITE;
          cw    <= '0;
        end
        S_WRITE: begin
          if (cw == CW'(RW - 1)) begin
            state <= S_REL;
            cw    <= '0;
          end else begin
            cw <= cw + 1'b1;
          end
        end
        S_REL: begin
          state <= S_CLAIM;
          if (r == YW'(H - 1)) begin
            r          <= '0;
            base       <= '0;
            nrows      <= '0;
            frame_done <= 1'b1;
          end else begin
            r <= r + 1'b1;
            if (base < r) begin
              base  <= base + 1'b1;
              nrows <= nrows - 1'b1;
            end
          end
        end
        default: state <= S_CLAIM;
      endcase
    end
  end

  // Reads stay inside the claimed window.
  a_window : assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_READ && rr_in) |-> (rr >= base && rr < base + YW'(nrows)))
    else $error("eros_accel: read outside the claimed window");

endmodule
