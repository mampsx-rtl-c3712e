// tb_cheap_buffer: random test of the C-HEAP circular buffer against a model.
//
// Each cycle one primitive is tried at random: claim space, write one claimed
// word, release written space, claim data, read a random word of the claimed
// read window (out of order) or release data. The model keeps the four
// pointers as unbounded integers; grants, the free/ready counts and every word
// read are compared with it. Word p of the stream carries value f(p).
module tb_cheap_buffer;
  import mampsx_pkg::*;

  localparam int DEPTH = 8;
  localparam int AW = 3;

  logic clk = 0, rst_n = 0;
  logic cs_req = 0, wr_en = 0, rs_req = 0, cd_req = 0, rd_req = 0;
  logic [AW:0] cs_n = 0, rs_n = 0, cd_n = 0, rd_n = 0;
  logic [AW-1:0] wr_off = 0, rd_off = 0;
  word_t wr_data = 0, rd_data;
  logic cs_gnt, cd_gnt;
  logic [AW:0] free_words, ready_words;

  int checks = 0, failures = 0;
  int m_rs = 0, m_re = 0, m_ws = 0, m_we = 0, m_wp = 0;  // model pointers, written-up-to
  int n_cs_ref = 0, n_cd_ref = 0, n_ooo = 0;

  cheap_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic word_t f(int p);
    return word_t'(p) * 32'h9E37_79B1 ^ 32'h0000_5A5A;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (rs=%0d re=%0d ws=%0d we=%0d)", what, m_rs, m_re, m_ws, m_we);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      {cs_req, wr_en, rs_req, cd_req, rd_req} = '0;
      check(free_words == DEPTH - (m_we - m_rs), "free count");
      check(ready_words == m_ws - m_re, "ready count");
      case ($urandom_range(0, 5))
        0: begin
          automatic int n = $urandom_range(1, 4);
          automatic bit exp = (n <= DEPTH - (m_we - m_rs));
          cs_req = 1; cs_n = n;
          #1 check(cs_gnt == exp, "claim space grant");
          if (!exp) n_cs_ref++;
          @(posedge clk); #1 cs_req = 0;
          if (exp) m_we += n;
        end
        1: if (m_wp < m_we) begin
          wr_en = 1; wr_off = m_wp - m_ws; wr_data = f(m_wp);
          @(posedge clk); #1 wr_en = 0;
          m_wp++;
        end
        2: if (m_wp > m_ws) begin
          automatic int n = $urandom_range(1, m_wp - m_ws);
          rs_req = 1; rs_n = n;
          @(posedge clk); #1 rs_req = 0;
          m_ws += n;
        end
        3: begin
          automatic int n = $urandom_range(1, 4);
          automatic bit exp = (n <= m_ws - m_re);
          cd_req = 1; cd_n = n;
          #1 check(cd_gnt == exp, "claim data grant");
          if (!exp) n_cd_ref++;
          @(posedge clk); #1 cd_req = 0;
          if (exp) m_re += n;
        end
        4: if (m_re > m_rs) begin
          automatic int o = $urandom_range(0, m_re - m_rs - 1);
          rd_off = o;
          if (o != 0) n_ooo++;
          #1 check(rd_data == f(m_rs + o), "read data");
        end
        5: if (m_re > m_rs) begin
          automatic int n = $urandom_range(1, m_re - m_rs);
          rd_req = 1; rd_n = n;
          @(posedge clk); #1 rd_req = 0;
          m_rs += n;
        end
      endcase
    end
    check(n_cs_ref > 0 && n_cd_ref > 0 && n_ooo > 0, "refusals and out-of-order reads exercised");
    $display("space refusals=%0d data refusals=%0d out-of-order reads=%0d words passed=%0d",
             n_cs_ref, n_cd_ref, n_ooo, m_rs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
