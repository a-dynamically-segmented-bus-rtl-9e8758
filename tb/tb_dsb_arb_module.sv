// Self-checking testbench of dsb_arb_module. Loads random requests, drives
// the shared L/R fields with random granted sections and left boundaries and
// compares M (resolution compare) and S (switch-setting compare) with ring
// arithmetic done here with integers; also checks that a grant makes the
// module drive its own L and R in the next cycle and that a granted module
// never matches again.
module tb_dsb_arb_module;
  localparam int unsigned N  = 16;
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned MY_ID = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, c_in = 1'b0, g_set = 1'b0, latch_lb = 1'b0, bus_valid = 1'b0;
  logic [PW-1:0] l_in = '0, r_in = '0, bus_l = '0, bus_r = '0;
  logic drv_en, c_out, m_out, g_out, s_out;
  logic [PW-1:0] drv_l, drv_r;
  int checks = 0, failures = 0;

  dsb_arb_module #(.N(N)) dut (
    .clk, .rst_n, .id_in(PW'(MY_ID)), .load, .c_in, .l_in, .r_in, .g_set, .latch_lb,
    .bus_valid, .bus_l, .bus_r, .drv_en, .drv_l, .drv_r, .c_out, .m_out, .g_out, .s_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int d(int a, int b);
    return (b - a + N) % N;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0b exp=%0b", what, got, exp);
    end
  endtask

  initial begin
    int lb, gl, gr, rl, rr, expm, exps;
    bit first;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 1500; t++) begin
      // load a request
      rl = $urandom % N;
      rr = (rl + ($urandom % 6)) % N;
      load <= 1'b1; c_in <= ($urandom % 8) != 0; l_in <= PW'(rl); r_in <= PW'(rr);
      @(posedge clk);
      load <= 1'b0;
      exps = 0;
      // a few resolution cycles with random sections on the fields
      lb = $urandom % N;
      first = 1'b1;
      for (int k = 0; k < 3; k++) begin
        gl = first ? lb : $urandom % N;
        gr = (gl + ($urandom % 5)) % N;
        bus_valid <= 1'b1; bus_l <= PW'(gl); bus_r <= PW'(gr); latch_lb <= first;
        #1;
        // free arc: from gr+1 counter-clockwise up to lb-1
        expm = int'(c_in && (d((gr + 1) % N, rl) + d(rl, rr) + 1 <= d((gr + 1) % N, lb)));
        #1;
        check("M", m_out, expm[0]);
        if (d(gl, MY_ID) < d(gl, gr)) exps = 1;
        @(posedge clk);
        first = 1'b0;
        #1;
        check("S", s_out, exps[0]);
      end
      bus_valid <= 1'b0; latch_lb <= 1'b0;
      // grant it and watch it drive the fields
      g_set <= 1'b1;
      @(posedge clk);
      g_set <= 1'b0;
      #1;
      check("G", g_out, 1'b1);
      check("drv_en", drv_en, 1'b1);
      checks++;
      if (drv_l !== PW'(rl) || drv_r !== PW'(rr)) failures++;
      // its own section on the fields must not match again
      bus_valid <= 1'b1; bus_l <= PW'((rr + 1) % N); bus_r <= PW'((rr + 1) % N);
      #1;
      check("M after grant", m_out, 1'b0);
      @(posedge clk);
      bus_valid <= 1'b0;
      #1;
      check("drv_en off", drv_en, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
