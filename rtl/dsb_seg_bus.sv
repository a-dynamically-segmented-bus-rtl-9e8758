// The segmented bus itself: N bus segments on a ring, joined by N switches.
//
// Switch i, when on, connects segment i with segment (i+1) mod N; there is
// no other connection between segments. Segments joined by switches that
// are on form one bus section and carry the same signals. Each PE can drive
// only its own segment. The bus is modelled as a wired-OR: a segment reads
// the OR of the values driven onto all segments of its section, and a PE
// that does not drive presents zero. The arbiter guarantees at most one
// driver per field and section, so the OR is simply that driver's value.
// With every switch off each PE is alone; with every switch on all share one
// bus. Purely combinational; W is the number of bus lines. The wired-OR
// model and the line count are choices of this implementation.
module dsb_seg_bus #(
  parameter int unsigned N = 64,
  parameter int unsigned W = 32
) (
  input  logic [N-1:0]        sw_on,  // switch i joins segment i and i+1
  input  logic [N-1:0][W-1:0] drv,    // value each PE drives on its segment
  output logic [N-1:0][W-1:0] seg     // value present on each segment
);

  for (genvar j = 0; j < N; j++) begin : g_seg
    always_comb begin
      logic         reach;
      logic [W-1:0] acc;
      acc = drv[j];
      // counter-clockwise: segment j+k is reached through switches j..j+k-1
      reach = 1'b1;
      for (int unsigned k = 1; k < N; k++) begin
        reach = reach & sw_on[(j + k - 1) % N];
        if (reach) acc = acc | drv[(j + k) % N];
      end
      // clockwise: segment j-k is reached through switches j-1..j-k
      reach = 1'b1;
      for (int unsigned k = 1; k < N; k++) begin
        reach = reach & sw_on[(j + N - k) % N];
        if (reach) acc = acc | drv[(j + N - k) % N];
      end
      seg[j] = acc;
    end
  end

endmodule
