// det_ff: double-edge-triggered flip-flop, stores its input on both the
// rising and the falling clock edge, so it carries the data rate of an
// ordinary flip-flop at half the clock frequency.
//
// Two complementary level-sensitive latches sit side by side on the input:
// lat_p is transparent while clk = 1 (Q' = D*CLK + Q*!CLK) and lat_n while
// clk = 0 (Q' = D*!CLK + Q*CLK). The output multiplexer always selects the
// latch that is in its storage state (lat_n while clk = 1, lat_p while
// clk = 0), so the flip-flop is never transparent from d to q: after a rising
// edge q shows the value d had just before it, held in lat_n, and after a
// falling edge the value held in lat_p. WIDTH bits are stored in parallel.
// There is no reset. This structure follows the source description; the width parameter
// is this design's. The two latches are intended.
module det_ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] lat_p, lat_n;

  always_latch begin
    if (clk) lat_p = d;
  end

  always_latch begin
    if (!clk) lat_n = d;
  end

  assign q = clk ? lat_n : lat_p;

endmodule
