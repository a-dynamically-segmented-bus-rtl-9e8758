// Rotating priority selector of the DS-Bus arbiter control unit.
//
// Picks, out of the request vector `req`, the first asserted bit found when
// scanning the ring counter-clockwise from position `start`
// (start, start+1, ..., N-1, 0, ..., start-1) and returns it one-hot.
// It is built the way the control unit of the arbiter is described: a barrel
// shifter rotates `req` so that `start` lands at bit 0, a priority encoder
// finds the lowest set bit, a decoder turns that index back into a one-hot
// vector and a second barrel shifter rotates it back by the same amount.
// Purely combinational; `any` is high when at least one bit of `req` is set,
// and `idx` is the ring position of the chosen bit.
module dsb_rot_priority #(
  parameter int unsigned N  = 64,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [PW-1:0] start,
  output logic [N-1:0]  gnt,
  output logic [PW-1:0] idx,
  output logic          any
);

  logic [N-1:0]  rotated;   // req rotated so that `start` is bit 0
  logic [PW-1:0] enc;       // priority-encoder output (rotated frame)
  logic [N-1:0]  dec;       // decoder output (rotated frame)

  // First barrel shifter: rotate right by `start`.
  always_comb begin
    for (int unsigned k = 0; k < N; k++)
      rotated[k] = req[(k + 32'(start)) % N];
  end

  // Priority encoder: lowest set bit wins.
  always_comb begin
    enc = '0;
    any = 1'b0;
    for (int k = N - 1; k >= 0; k--) begin
      if (rotated[k]) begin
        enc = PW'(k);
        any = 1'b1;
      end
    end
  end

  // Decoder.
  always_comb begin
    dec = '0;
    if (any) dec[enc] = 1'b1;
  end

  // Second barrel shifter: rotate left by `start` (opposite direction).
  always_comb begin
    for (int unsigned p = 0; p < N; p++)
      gnt[p] = dec[(p + N - 32'(start)) % N];
  end

  assign idx = PW'((32'(enc) + 32'(start)) % N);

endmodule
