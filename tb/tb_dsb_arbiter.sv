// Self-checking testbench of dsb_arbiter. Random request sets (local,
// long, wrapping and whole-ring sections, and empty sets) are resolved by
// the arbiter and by the reference model; the granted set, the switch
// setting, the grant count, the rotation start and the resolution time
// (done in the M+2-th cycle after the start cycle) are compared. It also checks that the
// granted sections never overlap. Two directed phases replay the conflict
// and the non-conflict examples of the architecture's description.
module tb_dsb_arbiter;
  import dsb_ref_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] req_valid = '0, grant, sw_on;
  logic [N-1:0][PW-1:0] req_l = '0, req_r = '0;
  logic busy, done;
  logic [CW-1:0] n_grants;
  logic [PW-1:0] rot_start;
  int checks = 0, failures = 0;

  dsb_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    automatic bit rv[], eg[], es[];
    int rl[], rr[];
    int s, m, cyc, maxlen, multi = 0;
    logic [N-1:0] expg, exps;
    rv = new[N]; rl = new[N]; rr = new[N];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    s = 0;
    for (int ph = 0; ph < 3000; ph++) begin
      maxlen = (ph % 4 == 0) ? N : 4;
      for (int i = 0; i < N; i++) begin
        rv[i] = ($urandom % 3 == 0) && (ph % 23 != 0);
        // a PE's section has itself at one end or inside (broadcast)
        if ($urandom % 2 == 1) begin
          rl[i] = i; rr[i] = (i + 1 + $urandom % (maxlen - 1)) % N;
        end else begin
          rr[i] = i; rl[i] = (i + N - 1 - $urandom % (maxlen - 1)) % N;
        end
      end
      // Directed cases. Phase 0: PE5 asks for segments 2..7 and PE8 for 6..8;
      // they share segments 6 and 7, so only PE5 (first from s = 0) is granted.
      // Phase 1: PE6 writes to PE11 (Left 6, Right 11), PE12 asks for 12..14
      // and PE3 for 1..3: no overlap, all three are granted.
      if (ph < 2) for (int i = 0; i < N; i++) rv[i] = 1'b0;
      if (ph == 0) begin
        rv[5] = 1'b1; rl[5] = 2; rr[5] = 7;
        rv[8] = 1'b1; rl[8] = 6; rr[8] = 8;
      end
      if (ph == 1) begin
        rv[6] = 1'b1;  rl[6] = 6;  rr[6] = 11;
        rv[12] = 1'b1; rl[12] = 12; rr[12] = 14;
        rv[3] = 1'b1;  rl[3] = 1;  rr[3] = 3;
      end
      for (int i = 0; i < N; i++) begin
        req_valid[i] <= rv[i];
        req_l[i] <= PW'(rl[i]);
        req_r[i] <= PW'(rr[i]);
      end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done && cyc < 100);
      m = resolve(N, s, rv, rl, rr, eg, es);
      expg = '0; exps = '0;
      for (int i = 0; i < N; i++) begin expg[i] = eg[i]; exps[i] = es[i]; end
      check("grant", longint'(grant), longint'(expg));
      check("switch", longint'(sw_on), longint'(exps));
      check("n_grants", longint'(n_grants), m);
      check("resolution time", cyc, m + 1);  // edges after the start edge
      if (m > 1) multi++;
      if (ph == 0) begin
        check("directed: conflict, PE5 only", longint'(grant), longint'(1 << 5));
        check("directed: switches 2..6", longint'(sw_on), longint'(16'b0000_0000_0111_1100));
      end
      if (ph == 1) begin
        check("directed: three disjoint grants", longint'(grant), longint'((1 << 3) | (1 << 6) | (1 << 12)));
        check("directed: switches 1,2 6..10 12,13", longint'(sw_on), longint'(16'b0011_0111_1100_0110));
      end
      // no segment may belong to two granted sections
      begin
        int seg_use[];
        seg_use = new[N];
        for (int i = 0; i < N; i++)
          if (grant[i])
            for (int k = 0; k <= ccw(rl[i], rr[i], N); k++) seg_use[(rl[i] + k) % N]++;
        for (int j = 0; j < N; j++) check("overlap", seg_use[j] > 1, 0);
      end
      @(posedge clk);
      s = (s + 1) % N;
    end
    check("phases with several grants seen", multi > 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
