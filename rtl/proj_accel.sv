// proj_accel: projection and centre-finding accelerator of the FFoS application.
//
// It takes the eroded binary image (packed rows, RW = ceil(W/32) words per row,
// bit k of word j = pixel 32*j+k) and projects it onto a horizontal vector
// (number of set pixels per row, H entries) and a vertical vector (number of
// set pixels per column, W entries). Each maximal run of non-zero entries in
// a vector is one structure; its centre is the middle of the run,
// (first+last)/2. Every pair (row centre, column centre) is a structure centre
// on the printing grid. The accelerator sends exactly C centre tokens per
// frame, 16 bits each in the low half of a word, {row[7:0], column[7:0]}, in
// raster order; unused tokens are 16'hFFFF and centres beyond C are dropped.
//
// Input rows are used through the C-HEAP primitives: claim RW words, read them,
// release them after the projections are updated. Output tokens are written
// with claim space, write and release space in one cycle.
// Timing per frame with no missing data: H*(RW+2) cycles for the projections,
// H+1 and W+1 cycles to scan the two vectors and C cycles to send the tokens.
// Projection onto two vectors follows the document; the run-midpoint rule, the
// token format and the fixed count C are this design's choices.
module proj_accel
  import mampsx_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned C      = 16,
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
  // centre tokens (producer side of a ca_tx)
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

  localparam int unsigned RW   = row_words(W);
  localparam int unsigned CW   = (RW > 1) ? $clog2(RW) : 1;
  localparam int unsigned MAXR = (H + 1) / 2;   // most runs a vector can hold
  localparam int unsigned MAXC = (W + 1) / 2;
  localparam int unsigned NW   = 8;             // width of a projection entry
  localparam int unsigned KW   = $clog2(C + 1);
  // index widths of the vectors and centre lists
  localparam int unsigned HI = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned WI = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned RI = (MAXR > 1) ? $clog2(MAXR) : 1;
  localparam int unsigned CI = (MAXC > 1) ? $clog2(MAXC) : 1;

  initial begin
    assert (W <= 255 && H <= 255)
      else $fatal(1, "proj_accel: coordinates must fit in 8 bits");
    assert (RW <= (1 << IN_AW))
      else $fatal(1, "proj_accel: input buffer cannot hold one row");
  end

  typedef enum logic [2:0] {S_CLAIM, S_READ, S_ACC, S_HSCAN, S_VSCAN, S_EMIT} state_e;
  state_e         state;
  logic [7:0]     r;                   // image row / scan position
  logic [CW-1:0]  cw;
  word_t          rowbuf [RW];
  logic [W-1:0]   rowbits;
  logic [NW-1:0]  hproj [H];
  logic [NW-1:0]  vproj [W];
  logic [7:0]     rlist [MAXR];
  logic [7:0]     clist [MAXC];
  logic [7:0]     nr, nc;              // number of row / column centres found
  logic           in_run;
  logic [7:0]     run_start;
  logic [7:0]     ei, ej;              // centre being emitted
  logic [KW-1:0]  k;                   // tokens sent in this frame
  logic           scan_bit, run_end;
  center_t        tok;

  always_comb begin
    for (int x = 0; x < W; x++) rowbits[x] = rowbuf[x / 32][x % 32];
  end

  // scan helpers: the current vector entry and whether a run just ended
  always_comb begin
    scan_bit = 1'b0;
    if (state == S_HSCAN && r < 8'(H)) scan_bit = (hproj[r[HI-1:0]] != '0);
    if (state == S_VSCAN && r < 8'(W)) scan_bit = (vproj[r[WI-1:0]] != '0);
  end
  assign run_end = in_run && !scan_bit;

  // input side
  assign in_cd_req = (state == S_CLAIM) && (in_ready_words >= (IN_AW+1)'(RW));
  assign in_cd_n   = (IN_AW+1)'(RW);
  assign in_rd_off = IN_AW'(cw);
  assign in_rd_req = (state == S_ACC);
  assign in_rd_n   = (IN_AW+1)'(RW);

  // output side
  always_comb begin
    if (ei < nr && nc != '0) tok = '{row: rlist[ei[RI-1:0]], col: clist[ej[CI-1:0]]};
    else                     tok = NO_CENTER;
  end
  assign out_cs_req  = (state == S_EMIT) && (out_free_words != '0);
  assign out_cs_n    = (OUT_AW+1)'(1);
  assign out_wr_en   = out_cs_req;
  assign out_wr_off  = '0;
  assign out_wr_data = {16'h0000, tok};
  assign out_rs_req  = out_cs_req;
  assign out_rs_n    = (OUT_AW+1)'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CLAIM;
      r          <= '0;
      cw         <= '0;
      nr         <= '0;
      nc         <= '0;
      in_run     <= 1'b0;
      run_start  <= '0;
      ei         <= '0;
      ej         <= '0;
      k          <= '0;
      frame_done <= 1'b0;
      for (int i = 0; i < RW; i++)   rowbuf[i] <= '0;
      for (int i = 0; i < H; i++)    hproj[i]  <= '0;
      for (int i = 0; i < W; i++)    vproj[i]  <= '0;
      for (int i = 0; i < MAXR; i++) rlist[i]  <= '0;
      for (int i = 0; i < MAXC; i++) clist[i]  <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_CLAIM: if (in_cd_gnt) begin
          state <= S_READ;
          cw    <= '0;
        end
        S_READ: begin
          rowbuf[cw] <= in_rd_data;
          if (cw == CW'(RW - 1)) state <= S_ACC;
          else                   cw    <= cw + 1'b1;
        end
        S_ACC: begin
          hproj[r[HI-1:0]] <= NW'($countones(rowbits));
          for (int x = 0; x < W; x++) vproj[x] <= vproj[x] + NW'(rowbits[x]);
          if (r == 8'(H - 1)) begin
            r      <= '0;
            nr     <= '0;
            in_run <= 1'b0;
            state  <= S_HSCAN;
          end else begin
            r     <= r + 1'b1;
            state <= S_CLAIM;
          end
        end
        S_HSCAN, S_VSCAN: begin
          if (scan_bit && !in_run) begin
            in_run    <= 1'b1;
            run_start <= r;
          end
          if (run_end) begin
            in_run <= 1'b0;
            if (state == S_HSCAN) begin
              if (nr < 8'(MAXR)) rlist[nr[RI-1:0]] <= 8'((9'(run_start) + 9'(r) - 9'd1) >> 1);
              nr <= nr + 1'b1;
            end else begin
              if (nc < 8'(MAXC)) clist[nc[CI-1:0]] <= 8'((9'(run_start) + 9'(r) - 9'd1) >> 1);
              nc <= nc + 1'b1;
            end
          end
          // one step past the last entry closes a run that reaches the edge
          if (state == S_HSCAN && r == 8'(H)) begin
            r      <= '0;
            nc     <= '0;
            in_run <= 1'b0;
            state  <= S_VSCAN;
          end else if (state == S_VSCAN && r == 8'(W)) begin
            r      <= '0;
            ei     <= '0;
            ej     <= '0;
            k      <= '0;
            in_run <= 1'b0;
            state  <= S_EMIT;
          end else begin
            r <= r + 1'b1;
          end
        end
        S_EMIT: if (out_cs_gnt) begin
          if (nc != '0 && ej == nc - 1'b1) begin
            ej <= '0;
            ei <= ei + 1'b1;
          end else begin
            ej <= ej + 1'b1;
          end
          if (k == KW'(C - 1)) begin
            state      <= S_CLAIM;
            frame_done <= 1'b1;
            for (int x = 0; x < W; x++) vproj[x] <= '0;
          end
          k <= k + 1'b1;
        end
        default: state <= S_CLAIM;
      endcase
    end
  end

endmodule
