// Workload testbench of dsb_top (64 PEs): Jacobi iteration on a banded
// system, equation i mapped to PE i.
//
// In every iteration each PE broadcasts its current x(i) over the section
// [i-HB, i+HB] (clipped at both ends of the band, so sections do not wrap),
// i.e. to every PE whose equation uses x(i). With HB = 10 a section spans 21
// segments. After receiving, each PE forms
//   x'(i) = b(i) - sum of x(k) over its neighbours k, |k-i| <= HB, k != i
// (integer arithmetic modulo 2^16, coefficients -1; only the exchange pattern
// matters for the bus). The testbench checks that each PE receives exactly
// its 2*HB (or fewer at the edges) neighbours' values, compares the results
// of every iteration with a software Jacobi step, and counts the bus cycles
// one exchange takes; it must stay below the 120 bus cycles of computation
// between two exchanges of this workload.
module tb_dsb_jacobi;
  localparam int N = 64, ID_W = 8, DATA_W = 16, BUF_DEPTH = 4, HB = 10, ITERS = 3;
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
    repeat (20000) @(posedge clk);
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
    logic [DATA_W-1:0] x[N], b[N], ref_x[N], acc[N];
    int nrx[N];
    for (int i = 0; i < N; i++) begin
      b[i] = DATA_W'($urandom);
      x[i] = DATA_W'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int it = 0; it < ITERS; it++) begin
      int sent, phases, done_cnt;
      bit pend[N];
      // software reference
      for (int i = 0; i < N; i++) begin
        ref_x[i] = b[i];
        for (int k = i - HB; k <= i + HB; k++)
          if (k >= 0 && k < N && k != i) ref_x[i] -= x[k];
        acc[i] = b[i];
        nrx[i] = 0;
        pend[i] = 1;
      end
      phases = 0;
      done_cnt = 0;
      while (done_cnt < N) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          req_valid[i] = pend[i];
          req_op[i]    = 2'd3;
          req_l[i]     = PW'((i - HB < 0) ? 0 : i - HB);
          req_r[i]     = PW'((i + HB > N - 1) ? N - 1 : i + HB);
          req_id[i]    = ID_W'(it);
          req_data[i]  = x[i];
        end
        @(posedge clk);
        for (int i = 0; i < N; i++) if (req_valid[i] && req_ready[i]) pend[i] = 0;
        #1;
        if (phase_done && phase_n_grants != 0) phases++;
        if (xfer) begin
          for (int j = 0; j < N; j++) begin
            if (rx_valid[j]) begin
              int src;
              src = int'(rx_src[j]);
              check("neighbour within band", src != j && src >= j - HB && src <= j + HB);
              check("iteration tag", int'(rx_id[j]) == it);
              acc[j] -= rx_data[j];
              nrx[j]++;
            end
            if (cpl_valid[j]) done_cnt++;
          end
        end
      end
      for (int i = 0; i < N; i++) begin
        int expn;
        expn = ((i + HB > N - 1) ? N - 1 : i + HB) - ((i - HB < 0) ? 0 : i - HB);
        check("every neighbour value received", nrx[i] == expn);
        check("Jacobi step result", acc[i] == ref_x[i]);
        x[i] = acc[i];
      end
      $display("iteration %0d: exchange took %0d bus cycles", it, phases);
      check("exchange shorter than the 120-bus-cycle computation", phases < 120);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
