// Self-checking testbench of dsb_arb_control. Plays the part of the arbiter
// modules: supplies a random C vector at the start of each phase and a
// random M vector (with M bits of already granted modules cleared) in each
// resolution cycle, then checks each G against an independent rotating scan,
// the latch_lb pulse, the grant count, the phase length (done exactly
// M+2 cycles after start) and the advance of the rotation counter.
module tb_dsb_arb_control;
  localparam int unsigned N  = 8;
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned OFF = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] c_vec = '0, m_vec = '0, g_set;
  logic latch_lb, busy, done;
  logic [CW-1:0] n_grants;
  logic [PW-1:0] rot_start;
  int checks = 0, failures = 0;

  dsb_arb_control #(.N(N), .ROT_OFFSET(OFF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", what, got, exp);
    end
  endtask

  function automatic logic [N-1:0] pick(logic [N-1:0] v, int s);
    logic [N-1:0] r = '0;
    for (int k = N - 1; k >= 0; k--)
      if (v[(s + k) % N]) r = N'(1) << ((s + k) % N);
    return r;
  endfunction

  initial begin
    int exp_s, grants, cycles;
    logic [N-1:0] granted;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    exp_s = OFF;
    for (int ph = 0; ph < 2000; ph++) begin
      #1;
      check("rot_start", int'(rot_start), exp_s);
      check("idle", int'(busy), 0);
      start <= 1'b1;
      c_vec <= (ph % 7 == 0) ? '0 : N'($urandom);
      @(posedge clk);
      start <= 1'b0;
      // FIRST cycle
      #1;
      cycles = 1;
      grants = 0;
      granted = pick(c_vec, exp_s);
      check("first G", int'(g_set), int'(granted));
      check("latch_lb in FIRST", int'(latch_lb), 0);
      if (granted != 0) grants++;
      if (granted != 0) begin
        // RESOLVE cycles
        for (int k = 0; ; k++) begin
          logic [N-1:0] m, exp_g;
          @(posedge clk);
          cycles++;
          m = N'($urandom) & ~granted;
          if ($urandom % 3 == 0) m = '0;
          m_vec <= m;
          #1;
          check("latch_lb", int'(latch_lb), (k == 0) ? 1 : 0);
          exp_g = pick(m, exp_s);
          check("G", int'(g_set), int'(exp_g));
          if (exp_g == 0) break;
          granted |= exp_g;
          grants++;
        end
      end
      m_vec <= '0;
      @(posedge clk);
      cycles++;
      #1;
      check("done", int'(done), 1);
      check("n_grants", int'(n_grants), grants);
      check("phase length", cycles, grants + 2);
      @(posedge clk);
      exp_s = (exp_s + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
