// paralleltoserial: word-by-word multiplexer that sends the sorted IDs out one
// per clock, each with its kill-tag word.
//
// A small state machine steps through the N words of a group. State 0 is the
// idle state after reset; states 1..N select word 0..N-1 (for N = 4 the state
// values 001, 010, 011, 100 of the source design), and after state N it returns
// to state 1, so a new group is taken every N clocks without a gap. In state k
// the word e[k-1] is registered into fout and {1'b1, e[k-1]} into kill: the
// leading 1 marks the tag as identified, and the word is the acknowledge that
// silences that tag. In the idle state both outputs are written with zero.
//
// Interface: e[0..N-1] are the sorted IDs (e, f, g, h of the source design),
// e[0] sent first. ps is the present state, brought out for observation.
// Timing: fout/kill show word k-1 in the clock after the state machine was in
// state k; e must stay steady for the N clocks of a group. rst is synchronous,
// active high. The state values, the kill word with its leading 1 and the
// sending order follow the source design; the zero outputs in the idle state
// and the synchronous reset are this design's own choices.
module paralleltoserial
  import rceat_pkg::*;
#(
  parameter int unsigned N = NTAG,
  parameter int unsigned W = ID_W,
  localparam int unsigned SW = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][W-1:0]  e,      // sorted IDs of the current group
  output logic [W-1:0]         fout,   // serial ID output
  output logic [W:0]           kill,   // kill-tag word {identified, ID}
  output logic [SW-1:0]        ps      // present state: 0 idle, k sends e[k-1]
);

  logic [SW-1:0] ns;
  logic [W-1:0]  word;

  always_comb begin
    if (ps == SW'(N)) ns = SW'(1);
    else              ns = ps + 1'b1;
  end

  always_comb begin
    word = '0;
    for (int k = 1; k <= N; k++)
      if (ps == SW'(k)) word = e[k-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ps   <= '0;
      fout <= '0;
      kill <= '0;
    end else begin
      ps   <= ns;
      fout <= word;
      kill <= (ps == '0) ? '0 : {1'b1, word};
    end
  end

  // The state never leaves 0..N, and the kill word always mirrors fout.
  a_state_range: assert property (@(posedge clk) disable iff (rst) ps <= SW'(N))
    else $error("paralleltoserial: state %0d out of range", ps);
  a_kill_word: assert property (@(posedge clk) disable iff (rst)
                                kill == '0 || kill == {1'b1, fout})
    else $error("paralleltoserial: kill word does not match fout");

endmodule
