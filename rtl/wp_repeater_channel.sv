// wp_repeater_channel: behavioural model (not synthesizable logic) of a
// wave-pipelined repeater line.
//
// A long wire is broken by N_STAGES repeaters, each a pair of inverters
// driving WIRE_MM of metal. There are no latches between the repeaters:
// a pass transistor clocked by clk1 puts each new word onto the input
// node, and the word travels down the line as a "wave" while the next
// word is already put on behind it. Since all bits see the same
// repeater chain, waves keep their spacing and several of them can be on
// the wire at once; a pass transistor clocked by clk2 (the same clock,
// arriving later at the far end) takes each wave off at the receiver.
// The number of waves in flight is the line delay divided by the clock
// period, rounded up.
//
// What it models: both pass transistors with their dynamic nodes are
// level-sensitive latches (transparent while their clock is high), and
// every repeater with its wire segment is a transport delay of
// STAGE_DELAY_PS. The per-stage delay default, 228.5 ps, is the measured
// delay of an inverter pair driving 1 mm of metal-1 wire in a 180 nm
// process; three stages 1 mm apart is the measured configuration. With
// this delay a period of about 229-342 ps keeps three waves on the line,
// 343-685 ps two and from 686 ps one; the measured ranges were 250-350,
// 420-800 and from 1070 ps.
//
// A new wave may enter only when the previous one has moved at least two
// inverter delays (one repeater stage, MIN_SPACING_PS) down the line;
// closer launches let one wave run into the one ahead. The model does
// not corrupt data for this; it raises `overrun` from a clk1 rising edge
// that came too soon after the previous one until the next edge that is
// far enough apart. Other electrical effects (pulse shaping by the
// inverters, charging of the input node) are not modelled. WIDTH, the
// number of parallel data lines, is this design's choice.
//
// The two latches are intentional: they are the pass-transistor storage
// nodes of the circuit.
module wp_repeater_channel #(
  parameter int unsigned WIDTH          = 16,
  parameter int unsigned N_STAGES       = 3,
  parameter real         STAGE_DELAY_PS = 228.5,
  parameter real         MIN_SPACING_PS = STAGE_DELAY_PS
) (
  input  logic             clk1,  // launch clock at the sending end
  input  logic             clk2,  // same clock as seen at the far end
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             overrun  // clk1 edges closer than MIN_SPACING_PS
);
  timeunit 1ps;
  timeprecision 100fs;

  logic [WIDTH-1:0] node [N_STAGES+1];  // node[0] is the input node C_i

  // Input pass transistor and its dynamic node.
  always_latch begin
    if (clk1) node[0] = d;
  end

  // Repeater stages: inverter pair plus wire, modelled as a transport delay.
  for (genvar s = 0; s < N_STAGES; s++) begin : g_rep
    always @(node[s]) node[s+1] <= #(STAGE_DELAY_PS) node[s];
  end

  // Spacing of successive waves at the launch end.
  realtime last_launch;
  initial begin
    overrun     = 1'b0;
    last_launch = -1.0e9;
  end
  always @(posedge clk1) begin
    overrun     <= ($realtime - last_launch) < MIN_SPACING_PS;
    last_launch <= $realtime;
  end

  // Output pass transistor at the receiving end.
  always_latch begin
    if (clk2) q = node[N_STAGES];
  end
endmodule
