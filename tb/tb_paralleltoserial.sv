// tb_paralleltoserial: self-checking test of the parallel-to-serial converter.
// A new group of four words is presented every four clocks. The test checks
// the state sequence 0 (idle) then 1, 2, 3, 4, 1, ... , that every word
// leaves on fout in order, one per clock, two clocks after its group is
// presented, that kill carries {1, word}, and that reset returns to idle.
module tb_paralleltoserial;
  import tb_ref_pkg::*;

  localparam int NG = 40;

  logic clk = 0, rst = 1;
  logic [3:0][15:0] e;
  logic [15:0] fout;
  logic [16:0] kill;
  logic [2:0]  ps;
  int checks = 0, failures = 0;
  ids4_t groups [NG];

  paralleltoserial dut (.clk, .rst, .e, .fout, .kill, .ps);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int edge_n;
    for (int g = 0; g < NG; g++)
      for (int i = 0; i < 4; i++) groups[g][i] = 16'($urandom);
    e = '1;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (ps !== 3'd0 || fout !== '0 || kill !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    e = groups[0];
    // Edge n after reset: state becomes ((n-1) mod 4) + 1; from edge 2 on,
    // fout holds word (n-2) mod 4 of group (n-2) / 4.
    for (edge_n = 1; edge_n <= 4 * NG + 1; edge_n++) begin
      @(posedge clk); #1;
      checks++;
      if (ps !== 3'(((edge_n - 1) % 4) + 1)) begin
        failures++; $display("FAIL edge %0d: ps=%0d", edge_n, ps);
      end
      if (edge_n == 1) begin
        checks++;
        if (fout !== '0 || kill !== '0) begin failures++; $display("FAIL idle output"); end
      end else begin
        automatic int g = (edge_n - 2) / 4;
        automatic int k = (edge_n - 2) % 4;
        checks++;
        if (fout !== groups[g][k] || kill !== {1'b1, groups[g][k]}) begin
          failures++;
          $display("FAIL edge %0d: fout=%h kill=%h expected word %0d of group %0d = %h",
                   edge_n, fout, kill, k, g, groups[g][k]);
        end
      end
      // Next group once the last word of this one has been taken.
      if (edge_n % 4 == 1 && edge_n > 1 && (edge_n - 1) / 4 < NG) e = groups[(edge_n - 1) / 4];
    end
    rst = 1; @(posedge clk); #1;
    checks++;
    if (ps !== 3'd0 || fout !== '0 || kill !== '0) begin failures++; $display("FAIL reset again"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
