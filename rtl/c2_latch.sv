// c2_latch: the level-sensitive pipeline latch of a C2 (counterflow-clocked)
// pipeline.
//
// Follows the document: the latch is transparent while its local clock `en`
// is high and opaque (holding) while it is low.  In silicon it is a dynamic
// latch; here it is a plain `always_latch`.  There is no reset: like the
// dynamic latch it models, its contents are valid only once data has flowed
// through it.
//
// Interface: en (local clock from the clock line), d, q.  Timing: q follows d
// with no cycle of latency while en is high and keeps the last value when en
// falls.
module c2_latch #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
