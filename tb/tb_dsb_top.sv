// End-to-end testbench of dsb_top at its default size (64 PEs).
//
// Each PE is modelled by this testbench: it submits random Write, Read and
// Broadcast requests with random section lengths at a request rate that
// changes over the run (light load, heavy load that fills the buffers, long
// and whole-ring sections, and an idle stretch), and answers reads with a
// word computed from its position and the data-ID. A scoreboard keeps each
// PE's requests in order and checks, phase by phase:
//   - the granted set against the reference resolution algorithm run on the
//     buffer heads the arbiter sampled, with the rotating scan start;
//   - the bus-cycle length (M+3 clock cycles for M grants);
//   - in the transfer cycle: completions, read data, read-service requests,
//     and that exactly the right PEs receive each Write and Broadcast.
// It counts how often each mechanism occurred (concurrent grants, deferred
// requests, full buffers, wrapping and whole-ring sections, each operation,
// empty phases, every rotation start) and fails a mechanism never seen.
module tb_dsb_top;
  import dsb_ref_pkg::*;
  localparam int N = 64, ID_W = 8, DATA_W = 16, BUF_DEPTH = 4;
  localparam int PW = $clog2(N), CW = $clog2(N + 1), BW = $clog2(BUF_DEPTH);
  localparam int CYCLES = 12000;

  typedef struct {
    int op, l, r, id, data;
  } rq_t;

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

  always #5 clk = ~clk;

  // PE memories answering reads
  function automatic logic [DATA_W-1:0] mem_word(int pe, int id);
    return DATA_W'((pe * 40503 + id * 2654435) ^ (id << 7) ^ 16'h3c5a);
  endfunction
  for (genvar i = 0; i < N; i++) begin : g_pe
    assign rd_data[i] = mem_word(i, int'(rd_id[i]));
  end

  int checks = 0, failures = 0;
  int n_multi = 0, n_defer = 0, n_full = 0, n_wrap = 0, n_ring = 0;
  int n_wr = 0, n_rd = 0, n_bc = 0, n_empty = 0, n_phases = 0, n_grants_tot = 0;
  bit rot_seen[N];

  initial begin
    repeat (CYCLES + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("[%0t] %s got %0d exp %0d", $time, what, got, exp);
    end
  endtask

  function automatic int ring(int x);
    return ((x % N) + N) % N;
  endfunction

  function automatic rq_t make_req(int i, int lmax);
    rq_t q;
    int kind, d, a;
    kind = $urandom % 10;
    q.id = $urandom % (1 << ID_W);
    q.data = $urandom % (1 << DATA_W);
    if (kind < 7) begin
      q.op = (kind < 4) ? 1 : 2;           // Write or Read
      d = 1 + $urandom % lmax;
      if ($urandom % 2 == 1) begin q.l = i; q.r = ring(i + d); end
      else begin q.l = ring(i - d); q.r = i; end
    end else begin
      q.op = 3;                            // Broadcast
      if ($urandom % 25 == 0) begin        // the whole ring
        q.l = i; q.r = ring(i - 1);
      end else begin
        a = $urandom % lmax;
        d = $urandom % lmax;
        if (a + d == 0) d = 1;
        q.l = ring(i - a); q.r = ring(i + d);
      end
    end
    return q;
  endfunction

  function automatic bit in_sec(int j, int l, int r);
    return ring(j - l) <= ring(r - l);
  endfunction

  initial begin
    rq_t q[N][$];            // requests in each PE's buffer, oldest first
    rq_t x[N];               // requests in the transfer stage
    bit  xg[N];
    rq_t nxt[N];
    bit  want[N], acc[N];
    bit  snap_v[];
    int  snap_l[], snap_r[];
    int  snap_s, last_done, cyc, phase_start_ok;
    bit  eg[], es[];
    bit  start_cycle, xfer_next;
    int  rate, lmax;
    snap_v = new[N]; snap_l = new[N]; snap_r = new[N];
    for (int i = 0; i < N; i++) begin want[i] = 0; acc[i] = 0; xg[i] = 0; end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    start_cycle = 1'b0;
    xfer_next = 1'b0;
    last_done = -1;
    phase_start_ok = 0;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      @(posedge clk);
      // requests handed over at this edge
      for (int i = 0; i < N; i++) if (acc[i]) q[i].push_back(nxt[i]);
      #1;
      if (cyc == 0) start_cycle = 1'b1;
      // ---- arbiter start: snapshot of the buffer heads ----
      if (start_cycle) begin
        for (int i = 0; i < N; i++) begin
          snap_v[i] = buf_count[i] != 0;
          check("buffer count", buf_count[i], q[i].size());
          if (snap_v[i]) begin snap_l[i] = q[i][0].l; snap_r[i] = q[i][0].r; end
          else begin snap_l[i] = 0; snap_r[i] = 0; end
        end
        snap_s = int'(rot_start);
        rot_seen[snap_s] = 1'b1;
        phase_start_ok = 1;
        start_cycle = 1'b0;
      end
      // ---- transfer cycle ----
      check("xfer", xfer, xfer_next);
      if (xfer_next) begin
        bit exp_rx[N], exp_rd[N];
        int rx_from[N];
        for (int j = 0; j < N; j++) begin exp_rx[j] = 0; exp_rd[j] = 0; rx_from[j] = -1; end
        for (int i = 0; i < N; i++) begin
          check("cpl_valid", cpl_valid[i], xg[i]);
          if (!xg[i]) continue;
          if (x[i].op == 3) begin
            for (int j = 0; j < N; j++)
              if (j != i && in_sec(j, x[i].l, x[i].r)) begin exp_rx[j] = 1; rx_from[j] = i; end
          end else begin
            int t;
            t = (x[i].l == i) ? x[i].r : x[i].l;
            if (x[i].op == 1) begin exp_rx[t] = 1; rx_from[t] = i; end
            else begin
              exp_rd[t] = 1; rx_from[t] = i;
              check("read data", cpl_data[i], mem_word(t, x[i].id));
            end
          end
        end
        for (int j = 0; j < N; j++) begin
          check("rx_valid", rx_valid[j], exp_rx[j]);
          check("rd_req", rd_req[j], exp_rd[j]);
          if (exp_rx[j]) begin
            int i;
            i = rx_from[j];
            check("rx_src", rx_src[j], i);
            check("rx_op", rx_op[j], x[i].op);
            check("rx_id", rx_id[j], x[i].id);
            check("rx_data", rx_data[j], x[i].data);
          end
          if (exp_rd[j]) check("rd_id", rd_id[j], x[rx_from[j]].id);
        end
        xfer_next = 1'b0;
      end
      // ---- end of an arbitration phase ----
      if (phase_done) begin
        int m, nreq;
        logic [N-1:0] expg;
        check("phase seen start", phase_start_ok, 1);
        m = resolve(N, snap_s, snap_v, snap_l, snap_r, eg, es);
        expg = '0;
        nreq = 0;
        for (int i = 0; i < N; i++) begin expg[i] = eg[i]; nreq += snap_v[i]; end
        check("grant set", (phase_grant != expg) ? 1 : 0, 0);
        check("n_grants", phase_n_grants, m);
        if (last_done >= 0) check("bus cycle length", cyc - last_done, m + 3);
        last_done = cyc;
        n_phases++;
        n_grants_tot += m;
        if (m > 1) n_multi++;
        if (m == 0) n_empty++;
        n_defer += nreq - m;
        // granted heads leave the buffers into the transfer stage
        for (int i = 0; i < N; i++) begin
          xg[i] = eg[i];
          if (eg[i]) begin
            x[i] = q[i].pop_front();
            case (x[i].op)
              1: n_wr++;
              2: n_rd++;
              default: n_bc++;
            endcase
            if (x[i].r < x[i].l) n_wrap++;
            if (ring(x[i].r - x[i].l) == N - 1) n_ring++;
          end
        end
        xfer_next = 1'b1;
        start_cycle = 1'b1;
        phase_start_ok = 0;
      end
      // ---- new requests from the PEs ----
      case ((cyc * 6) / CYCLES)
        0: begin rate = 3;  lmax = 4;  end   // light load, short sections
        1: begin rate = 30; lmax = 4;  end   // beyond capacity: buffers fill
        2: begin rate = 6;  lmax = 16; end   // long sections
        3: begin rate = 0;  lmax = 4;  end   // idle: buffers drain, empty phases
        4: begin rate = 12; lmax = 8;  end
        default: begin rate = 8; lmax = 2; end
      endcase
      for (int i = 0; i < N; i++) begin
        if (!want[i] || acc[i]) begin
          want[i] = ($urandom % 100) < rate;
          if (want[i]) nxt[i] = make_req(i, lmax);
        end
        req_valid[i] <= want[i];
        req_op[i]    <= 2'(nxt[i].op);
        req_l[i]     <= PW'(nxt[i].l);
        req_r[i]     <= PW'(nxt[i].r);
        req_id[i]    <= ID_W'(nxt[i].id);
        req_data[i]  <= DATA_W'(nxt[i].data);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        acc[i] = want[i] && req_ready[i];
        if (want[i] && !req_ready[i]) n_full++;
        if (acc[i]) check("ready only with room", q[i].size() < BUF_DEPTH || phase_grant[i], 1);
      end
    end
    $display("phases=%0d grants=%0d multi-grant phases=%0d deferred=%0d buffer-full=%0d",
             n_phases, n_grants_tot, n_multi, n_defer, n_full);
    $display("writes=%0d reads=%0d broadcasts=%0d wrapping=%0d whole-ring=%0d empty phases=%0d",
             n_wr, n_rd, n_bc, n_wrap, n_ring, n_empty);
    check("concurrent grants seen", n_multi > 0, 1);
    check("deferred requests seen", n_defer > 0, 1);
    check("full buffer seen", n_full > 0, 1);
    check("writes seen", n_wr > 0, 1);
    check("reads seen", n_rd > 0, 1);
    check("broadcasts seen", n_bc > 0, 1);
    check("wrapping sections seen", n_wrap > 0, 1);
    check("whole-ring broadcast seen", n_ring > 0, 1);
    check("empty phases seen", n_empty > 0, 1);
    begin
      int nrot = 0;
      for (int s = 0; s < N; s++) nrot += rot_seen[s];
      check("every rotation start seen", nrot, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
