// gated_tristate_bus: N tri-state drivers on one shared bus, with gated
// enables and a bus keeper.
//
// A tri-state driver's input is unobservable at its output when its enable is
// low.  Each enable is gated with the ODC of the bus in the same cycle:
//
//     tri_en_gated[i] = tri_en[i] & ~ODC_P(TriOut)
//
// A primary output of a datapath has an ODC of zero unless the environment
// says otherwise, so `odc` is an input and is tied low where the bus leaves
// the datapath.
//
// The bus is modelled in two-state logic: the enabled drivers are AND-ORed,
// and when no driver is on, a keeper holds the last driven value, which is
// what a bus holder on a real tri-state bus does.  The keeper and the AND-OR
// resolution are this implementation's choices.  At most one driver may be
// enabled at a time (checked by an assertion).
//
// Timing: bus is combinational from the drivers; the keeper flop samples the
// bus on every rising clock edge.  Synchronous reset clears the keeper.
module gated_tristate_bus #(
  parameter int unsigned W = csg_pkg::DATA_W,
  parameter int unsigned N = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        tri_en,      // ungated driver enables
  input  logic                odc,         // ODC_P of the bus in this cycle
  input  logic [N-1:0][W-1:0] tri_in,      // driver data inputs
  output logic [N-1:0]        tri_en_gated,
  output logic [W-1:0]        bus,
  output logic                driven       // some driver is on
);

  logic [W-1:0] keep_q;
  logic [W-1:0] drive;

  assign tri_en_gated = tri_en & {N{~odc}};
  assign driven       = |tri_en_gated;

  always_comb begin
    drive = '0;
    for (int i = 0; i < N; i++) drive |= {W{tri_en_gated[i]}} & tri_in[i];
  end

  assign bus = driven ? drive : keep_q;

  always_ff @(posedge clk) begin
    if (!rst_n) keep_q <= '0;
    else        keep_q <= bus;
  end

  a_one_driver : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tri_en_gated))
    else $error("gated_tristate_bus: more than one driver enabled");

endmodule
