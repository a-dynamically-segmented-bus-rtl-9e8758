// Traffic testbench of dsb_top (64 PEs): the uniform-load model.
//
// Every PE issues, in each bus cycle (arbitration phase), a new request with
// probability 1/c, where c is the mean request interval in bus cycles. Each
// request is a Broadcast over a section of L+1 = 5 segments centred on the
// PE. Requests wait in an unbounded software queue in front of the PE's
// hardware buffer. For c = 20, 12, 8, 6 and 5 the testbench measures the
// accept rate (grants / pending requests per phase), the mean delay in bus
// cycles from issue to grant and the bandwidth (grants per bus cycle) and
// prints them next to the analytic estimates Ps = 1 - L/c, BW = N/c and
// d = c / ((c-L)(c-L-1)) (valid for c >= 1+L).
// Checks: every request is delivered, in order per PE, to all other PEs of
// its section; below capacity (c >= 8) the measured bandwidth must match the
// offered load N/c within 10%; at c = 5 the bus must be saturated (mean
// delay growing beyond that at c = 8).
module tb_dsb_traffic;
  localparam int N = 64, ID_W = 8, DATA_W = 16, BUF_DEPTH = 4, L = 4;
  localparam int PW = $clog2(N), CW = $clog2(N + 1), BW = $clog2(BUF_DEPTH);
  localparam int PHASES = 2000;

  typedef struct { int id, born; } rq_t;

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
    repeat (2_000_000) @(posedge clk);
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

  function automatic int ring(int x);
    return ((x % N) + N) % N;
  endfunction

  initial begin
    rq_t sw_q[N][$];      // waiting in front of the hardware buffer
    rq_t hw_q[N][$];      // in the hardware buffer
    int  seq[N];          // next sequence number (data-ID) per PE
    int  done_seq[N];     // next expected completion per PE
    bit  acc[N];
    int  cs[5] = '{20, 12, 8, 6, 5};
    real dly_c8;
    int  bus_cycle;
    for (int i = 0; i < N; i++) begin seq[i] = 0; done_seq[i] = 0; acc[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    bus_cycle = 0;
    for (int ci = 0; ci < 5; ci++) begin
      int c, phases, grants, pend, nreq;
      longint dsum;
      real pr, bw, dly, ps_eq, d_eq;
      c = cs[ci];
      phases = 0; grants = 0; pend = 0; nreq = 0; dsum = 0;
      while (phases < PHASES) begin
        @(posedge clk);
        for (int i = 0; i < N; i++) if (acc[i]) hw_q[i].push_back(sw_q[i].pop_front());
        #1;
        if (phase_done) begin
          bus_cycle++;
          phases++;
          grants += int'(phase_n_grants);
          for (int i = 0; i < N; i++) begin
            if (hw_q[i].size() != 0) pend++;
            if (phase_grant[i]) begin
              rq_t g;
              g = hw_q[i].pop_front();
              dsum += bus_cycle - g.born;
            end
            // new requests of this bus cycle
            if ($urandom % c == 0) begin
              rq_t n;
              n.id = seq[i] % 256; n.born = bus_cycle;
              seq[i]++;
              sw_q[i].push_back(n);
              nreq++;
            end
          end
        end
        if (xfer) begin
          for (int i = 0; i < N; i++) begin
            if (cpl_valid[i]) begin
              // every other PE of the section received it
              for (int j = i - L / 2; j <= i + L / 2; j++)
                if (j != i) check("broadcast delivered",
                                  rx_valid[ring(j)] && int'(rx_src[ring(j)]) == i &&
                                  int'(rx_id[ring(j)]) == done_seq[i] % 256);
              done_seq[i]++;
            end
          end
        end
        for (int i = 0; i < N; i++) begin
          req_valid[i] <= sw_q[i].size() != 0;
          req_op[i]    <= 2'd3;
          req_l[i]     <= PW'(ring(i - L / 2));
          req_r[i]     <= PW'(ring(i + L / 2));
          req_id[i]    <= (sw_q[i].size() != 0) ? ID_W'(sw_q[i][0].id) : '0;
          req_data[i]  <= DATA_W'(i);
        end
        #1;
        for (int i = 0; i < N; i++) acc[i] = req_valid[i] && req_ready[i];
      end
      pr    = real'(grants) / real'(pend);
      bw    = real'(grants) / real'(phases);
      dly   = (grants > 0) ? real'(dsum) / real'(grants) : 0.0;
      ps_eq = (c >= 1 + L) ? 1.0 - real'(L) / real'(c) : 1.0 / (1 + L);
      d_eq  = (c > 1 + L) ? real'(c) / (real'(c - L) * real'(c - L - 1)) : -1.0;
      $display("c=%0d: accept rate %.3f (eq. Ps %.3f)  delay %.2f bus cycles (eq. %.2f)  bandwidth %.2f (N/c %.2f)  requests %0d",
               c, pr, ps_eq, dly, d_eq, bw, real'(N) / real'(c), nreq);
      if (c >= 8) check($sformatf("bandwidth matches offered load at c=%0d", c),
                        bw > 0.9 * real'(N) / real'(c) && bw < 1.1 * real'(N) / real'(c));
      if (c == 8) dly_c8 = dly;
      if (c == 5) check("saturation beyond capacity", dly > 2.0 * dly_c8);
    end
    // drain
    for (int t = 0; t < 200000; t++) begin
      bit empty;
      @(posedge clk);
      for (int i = 0; i < N; i++) if (acc[i]) hw_q[i].push_back(sw_q[i].pop_front());
      #1;
      if (phase_done)
        for (int i = 0; i < N; i++) if (phase_grant[i]) void'(hw_q[i].pop_front());
      if (xfer) for (int i = 0; i < N; i++) if (cpl_valid[i]) done_seq[i]++;
      for (int i = 0; i < N; i++) begin
        req_valid[i] <= sw_q[i].size() != 0;
        req_id[i]    <= (sw_q[i].size() != 0) ? ID_W'(sw_q[i][0].id) : '0;
      end
      #1;
      for (int i = 0; i < N; i++) acc[i] = req_valid[i] && req_ready[i];
      empty = 1;
      for (int i = 0; i < N; i++) if (done_seq[i] != seq[i]) empty = 0;
      if (empty) break;
    end
    for (int i = 0; i < N; i++) check("all requests completed", done_seq[i] == seq[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
