// tb_post_rceat: self-checking test of the post-processing stage.
// A new group of four IDs is presented every four clocks; every group must
// come out on tag_out smallest first, one ID per clock, starting two clocks
// after it was presented, with tag_kill = {1, ID}.
module tb_post_rceat;
  import tb_ref_pkg::*;

  localparam int NG = 60;

  logic clk = 0, rst = 1;
  logic [3:0][15:0] id;
  logic [15:0] tag_out;
  logic [16:0] tag_kill;
  logic [2:0]  phase;
  int checks = 0, failures = 0;
  ids4_t groups [NG], sorted [NG];

  post_rceat dut (.clk, .rst, .id, .tag_out, .tag_kill, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NG; g++) begin
      for (int i = 0; i < 4; i++)
        groups[g][i] = (g < NKNOWN) ? KNOWN[g][i][31:16]
                     : (g % 4 == 0) ? 16'($urandom_range(0, 2)) : 16'($urandom);
      sorted[g] = sort_ref(groups[g]);
    end
    id = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int n = 1; n <= 4 * NG + 1; n++) begin
      if ((n - 1) % 4 == 0 && (n - 1) / 4 < NG) id = groups[(n - 1) / 4];
      @(posedge clk); #1;
      checks++;
      if (phase !== 3'(((n - 1) % 4) + 1)) begin failures++; $display("FAIL edge %0d phase %0d", n, phase); end
      if (n >= 2) begin
        automatic int g = (n - 2) / 4;
        automatic int k = (n - 2) % 4;
        checks++;
        if (tag_out !== sorted[g][k] || tag_kill !== {1'b1, sorted[g][k]}) begin
          failures++;
          $display("FAIL edge %0d: tag_out=%h expected %h (group %0d word %0d)", n, tag_out, sorted[g][k], g, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
