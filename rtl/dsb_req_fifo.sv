// Request buffer between a PE and the DS-Bus.
//
// Requests a PE submits wait here until the arbiter accepts them; when the
// request rate exceeds what the bus accepts, the buffer fills and the PE is
// held off (push_ready low). First-in first-out, DEPTH entries of W bits.
// Interface: push_valid/push_ready handshake on the PE side; on the bus
// side head_valid/head_data show the oldest request and `pop` (one cycle,
// only while head_valid) removes it. The head is a register read (no
// fall-through): a request pushed in cycle t is visible at the head in
// cycle t+1. Push and pop in the same cycle are allowed, also when full.
// The depth and the handshake are choices of this implementation; the
// architecture only says that such buffers hold waiting requests.
module dsb_req_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_valid,
  output logic          push_ready,
  input  logic [W-1:0]  push_data,
  output logic          head_valid,
  output logic [W-1:0]  head_data,
  input  logic          pop,
  output logic [AW:0]   count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [AW:0]   cnt_q;
  logic          do_push, do_pop;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign do_pop     = pop && (cnt_q != '0);
  assign push_ready = (32'(cnt_q) < DEPTH) || do_pop;
  assign do_push    = push_valid && push_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= nxt(wr_q);
      if (do_pop)  rd_q <= nxt(rd_q);
      cnt_q <= cnt_q + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= push_data;
  end

  assign head_valid = (cnt_q != '0);
  assign head_data  = mem[rd_q];
  assign count      = cnt_q;

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
