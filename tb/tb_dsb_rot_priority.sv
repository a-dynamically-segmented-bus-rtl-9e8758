// Self-checking testbench of dsb_rot_priority: random request vectors and
// start positions, compared with a scan of the ring written as a loop.
module tb_dsb_rot_priority;
  localparam int unsigned N  = 64;
  localparam int unsigned PW = $clog2(N);

  logic [N-1:0]  req, gnt, exp_gnt;
  logic [PW-1:0] start, idx;
  logic          any;
  int checks = 0, failures = 0;

  dsb_rot_priority #(.N(N)) dut (.req(req), .start(start), .gnt(gnt), .idx(idx), .any(any));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int found;
      req   = {$urandom, $urandom};
      // sparse vectors too, so that the wrap-around path is exercised
      if (t % 3 == 1) req = req & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if (t % 3 == 2) req = N'(1) << ($urandom % N);
      if (t % 50 == 0) req = '0;
      start = PW'($urandom % N);
      #1;
      exp_gnt = '0;
      found = -1;
      for (int k = 0; k < N; k++) begin
        int p;
        p = (int'(start) + k) % N;
        if (found < 0 && req[p]) found = p;
      end
      if (found >= 0) exp_gnt[found] = 1'b1;
      checks++;
      if (gnt !== exp_gnt || any !== (found >= 0) || (found >= 0 && int'(idx) != found)) begin
        failures++;
        if (failures < 10)
          $display("mismatch req=%h start=%0d gnt=%h exp=%h idx=%0d", req, start, gnt, exp_gnt, idx);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
