// Workload testbench of dsb_top (64 PEs): summation of N numbers.
//
// A(i) sits in PE i+1 (ring position i). In step s = 1..log2 N, PE
// 2^(s-1)*(2k-1) writes its partial sum to PE 2^s*k (numbering from 1), which
// adds it to its own; after log2 N steps PE N holds the total. The sections of
// one step never overlap, so every step must finish in one bus cycle: the
// testbench checks that all writes of a step are granted in the same phase
// (N/2^s grants), that each receiver gets the right word from the right
// sender, and that the final sum is correct (modulo 2^16).
module tb_dsb_sum;
  localparam int N = 64, ID_W = 8, DATA_W = 16, BUF_DEPTH = 4;
  localparam int PW = $clog2(N), CW = $clog2(N + 1), BW = $clog2(BUF_DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req_valid = '0, req_ready, cpl_valid, rx_valid, rd_req;
  logic [N-1:0][1:0] req_op = '0, rx_op;
  logic [N-1:0][PW-1:0] req_l = '0, req_r = '0, rx_src;
  logic [N-1:0][ID_W-1:0] req_id = '0, rx_id, rd_id;
  logic [N-1:0][DATA_W-1:0] req_data = '0, cpl_data, rx_data, rd_data;
  logic [N-1:0][BW:0] buf_count;
  logic phase_done, xfer;
  logic [N-1:0] phase_grant, xfer_sw;
  logic [CW-1:0] phase_n_grants;
  logic [PW-1:0] rot_start;

  dsb_top dut (.*);

  assign rd_data = '0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0t] check failed: %s", $time, what);
    end
  endtask

  initial begin
    logic [DATA_W-1:0] part[N];
    logic [DATA_W-1:0] total;
    int steps, clocks;
    total = '0;
    for (int i = 0; i < N; i++) begin
      part[i] = DATA_W'($urandom % 1000);
      total += part[i];
    end
    steps = $clog2(N);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    clocks = 0;
    for (int s = 1; s <= steps; s++) begin
      int half, nsend, got_phase, delivered;
      bit sender[N];
      half = 1 << (s - 1);
      nsend = N >> s;
      // submit all writes of this step in one cycle
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        int p;
        p = i + 1;
        sender[i] = (p % (2 * half)) == half;
        req_valid[i] = sender[i];
        req_op[i]    = 2'd1;
        req_l[i]     = PW'(i);
        req_r[i]     = PW'(i + half);
        req_id[i]    = ID_W'(s);
        req_data[i]  = part[i];
      end
      @(posedge clk);
      #1;
      req_valid = '0;
      got_phase = 0;
      delivered = 0;
      while (delivered < nsend) begin
        @(posedge clk);
        clocks++;
        #1;
        if (phase_done && phase_n_grants != 0) begin
          got_phase++;
          check($sformatf("step %0d: all %0d writes in one phase", s, nsend),
                int'(phase_n_grants) == nsend);
        end
        if (xfer) begin
          for (int j = 0; j < N; j++) if (rx_valid[j]) begin
            check("receiver is 2^s*k", ((j + 1) % (2 * half)) == 0);
            check("sender is receiver - 2^(s-1)", int'(rx_src[j]) == j - half);
            check("step tag", int'(rx_id[j]) == s);
            check("partial sum", rx_data[j] == part[j - half]);
            part[j] += rx_data[j];
            delivered++;
          end
        end
      end
      check($sformatf("step %0d took one bus cycle", s), got_phase == 1);
    end
    check("total in PE N", part[N-1] == total);
    $display("sum %0d of %0d numbers in %0d steps, %0d clock cycles", part[N-1], N, steps, clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
