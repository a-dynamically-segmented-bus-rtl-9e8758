// One arbiter module of the distributed DS-Bus arbiter (one per PE).
//
// Registers, as in the register-level arbiter design: C (request pending),
// L and R (the requested section), LB (left boundary of the granted bus
// section), ID (this module's position on the ring), G (granted) and
// S (switch setting). Two comparators work on the shared L/R fields:
//   C1, resolution compare: M is raised when this module's request is still
//       pending and its section lies wholly inside the free arc of the ring,
//       i.e. counter-clockwise after the right boundary (the R now on the
//       fields) and before the left boundary LB. A granted request then
//       becomes the new right boundary, so the granted bus section grows
//       counter-clockwise from where the resolution started.
//   C2, switch-setting compare: S is set when R > ID >= L on the ring, i.e.
//       when this module's switch (between segment ID and ID+1) lies inside
//       the section now on the fields, not on its right end.
// Timing: reset is synchronous and active low; ID takes `id_in` during
// reset. `load` (one cycle) captures c_in/l_in/r_in and clears G and S.
// `g_set` from the control unit sets G; in the next cycle the module drives
// its L and R onto the fields (drv_en high, values zero otherwise so that
// the fields can be a wired-OR). `latch_lb` makes LB take the L on the
// fields; in that same cycle C1 already uses the value on the fields, so the
// first grant's section is the whole granted bus section. All comparisons
// are modulo N, so sections may wrap around the ring. The modular compare and
// the zero-when-idle fields are choices of this implementation; the register
// set, comparators and rules come from the architecture.
module dsb_arb_module #(
  parameter int unsigned N  = 64,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] id_in,     // ordering number, loaded into ID at reset
  // request capture at the start of an arbitration phase
  input  logic          load,
  input  logic          c_in,
  input  logic [PW-1:0] l_in,
  input  logic [PW-1:0] r_in,
  // from the control unit
  input  logic          g_set,
  input  logic          latch_lb,
  // shared L/R fields
  input  logic          bus_valid,
  input  logic [PW-1:0] bus_l,
  input  logic [PW-1:0] bus_r,
  output logic          drv_en,
  output logic [PW-1:0] drv_l,
  output logic [PW-1:0] drv_r,
  // status
  output logic          c_out,
  output logic          m_out,
  output logic          g_out,
  output logic          s_out
);

  logic          c_q, g_q, s_q, gnew_q;
  logic [PW-1:0] l_q, r_q, lb_q, id_q;
  logic          sw_match;

  // Counter-clockwise distance from a to b, modulo N.
  function automatic logic [PW:0] ccw_dist(logic [PW-1:0] a, logic [PW-1:0] b);
    logic [PW:0] ea, eb;
    ea = {1'b0, a};
    eb = {1'b0, b};
    return (eb >= ea) ? (eb - ea) : (eb + (PW+1)'(N) - ea);
  endfunction

  function automatic logic [PW-1:0] inc(logic [PW-1:0] a);
    return (32'(a) == N - 1) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_q    <= 1'b0;
      l_q    <= '0;
      r_q    <= '0;
      lb_q   <= '0;
      g_q    <= 1'b0;
      s_q    <= 1'b0;
      gnew_q <= 1'b0;
    end else if (load) begin
      c_q    <= c_in;
      l_q    <= l_in;
      r_q    <= r_in;
      g_q    <= 1'b0;
      s_q    <= 1'b0;
      gnew_q <= 1'b0;
    end else begin
      gnew_q <= g_set;
      if (g_set) g_q <= 1'b1;
      if (latch_lb) lb_q <= bus_l;
      if (bus_valid && sw_match) s_q <= 1'b1;
    end
  end

  // ID register: takes the ordering number during reset (synchronous load).
  always_ff @(posedge clk) begin
    if (!rst_n) id_q <= id_in;
  end

  // C1: resolution compare.
  logic [PW-1:0] lb_eff, rb_next;
  logic [PW:0]   free_len, start_off, req_len;
  logic          fits;
  always_comb begin
    lb_eff    = latch_lb ? bus_l : lb_q;
    rb_next   = inc(bus_r);
    free_len  = ccw_dist(rb_next, lb_eff);
    start_off = ccw_dist(rb_next, l_q);
    req_len   = ccw_dist(l_q, r_q) + 1'b1;
    fits      = ({1'b0, start_off} + {1'b0, req_len}) <= {1'b0, free_len};
  end
  assign m_out = c_q && !g_q && bus_valid && fits;

  // C2: switch-setting compare, R > ID >= L on the ring.
  assign sw_match = ccw_dist(bus_l, id_q) < ccw_dist(bus_l, bus_r);

  assign drv_en = gnew_q;
  assign drv_l  = gnew_q ? l_q : '0;
  assign drv_r  = gnew_q ? r_q : '0;
  assign c_out  = c_q;
  assign g_out  = g_q;
  assign s_out  = s_q;

endmodule
