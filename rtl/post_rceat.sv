// post_rceat: post-processing stage of the RCEAT identifier (the tree
// algorithm of the source design).
//
// The N IDs of a read cycle go to the fast search, which orders them from
// smallest to largest in one clock; the parallel-to-serial converter then
// sends them out one per clock, smallest first, each with its kill-tag word.
//
// Timing: counting the first rising edge after rst falls as edge 1, group g
// must be on id from before edge N*g+1 until after edge N*g+N. Its sorted
// word k (k = 0..N-1, smallest first) is on tag_out and tag_kill from edge
// N*g+2+k to edge N*g+3+k: one clock for the search register and one for the
// output register. rst is synchronous, active high.
module post_rceat
  import rceat_pkg::*;
#(
  parameter int unsigned N = NTAG,
  parameter int unsigned W = ID_W,
  localparam int unsigned SW = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][W-1:0]  id,        // IDs of the current group
  output logic [W-1:0]         tag_out,   // identified ID, one per clock
  output logic [W:0]           tag_kill,  // kill-tag word {1, ID}
  output logic [SW-1:0]        phase      // serializer state, 0 idle
);

  logic [N-1:0][W-1:0] sorted;

  fastsearch #(.N(N), .W(W)) u_search (
    .clk(clk),
    .rst(rst),
    .a  (id),
    .s  (sorted)
  );

  paralleltoserial #(.N(N), .W(W)) u_p2s (
    .clk (clk),
    .rst (rst),
    .e   (sorted),
    .fout(tag_out),
    .kill(tag_kill),
    .ps  (phase)
  );

endmodule
