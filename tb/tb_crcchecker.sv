// tb_crcchecker: self-checking test of the CRC checker.
// Checks the example IDs with known CRCs, random good messages (sbit = 0),
// random messages with one flipped bit in one tag (sbit = 1, that err bit set)
// and the one-clock latency and reset value of the outputs.
module tb_crcchecker;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][15:0] p, rcrc;
  logic sbit;
  logic [3:0] err;
  int checks = 0, failures = 0;

  crcchecker dut (.clk, .rst, .p, .rcrc, .sbit, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_s, input logic [3:0] exp_e, input string what);
    checks++;
    if (sbit !== exp_s || err !== exp_e) begin
      failures++;
      $display("FAIL %s: sbit=%0d err=%b, expected %0d %b", what, sbit, err, exp_s, exp_e);
    end
  endtask

  // Apply one group, clock once, check.
  task automatic apply(input logic [3:0][15:0] ids, input logic [3:0][15:0] crcs, input string what);
    logic [3:0] e;
    for (int i = 0; i < 4; i++) e[i] = (crc_ref(ids[i]) != crcs[i]);
    p = ids; rcrc = crcs;
    @(posedge clk); #1;
    check(|e, e, what);
  endtask

  initial begin
    logic [3:0][15:0] ids, crcs;
    p = '0; rcrc = '1;
    repeat (2) @(posedge clk); #1;
    check(1'b0, 4'b0, "reset");
    rst = 0;
    // Known examples from the worked values: 0x0010 -> 0x1231 etc.
    checks++; if (crc_ref(16'h0010) != 16'h1231) begin failures++; $display("FAIL ref"); end
    apply('{16'h0014, 16'h0010, 16'h0006, 16'h0005}, '{16'h52b5, 16'h1231, 16'h60c6, 16'h50a5}, "known good");
    apply('{16'hea6c, 16'h0014, 16'h0006, 16'h00d0}, '{16'h5253, 16'h52b5, 16'h60c6, 16'hcb7d}, "known good 2");
    apply('{16'h0018, 16'h0010, 16'h0006, 16'h0007}, '{16'hcda0, 16'h1231, 16'h60c6, 16'hb001}, "known bad");
    // The output must not change before the clock edge.
    p[2] = 16'h1234; rcrc[2] = 16'h0000; #1;
    check(1'b1, 4'b1001, "holds until clock");
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) begin
        ids[i]  = 16'($urandom);
        crcs[i] = crc_ref(ids[i]);
      end
      if (n % 2 == 1) begin
        automatic int t = $urandom_range(0, 3);
        automatic int b = $urandom_range(0, 31);
        if (b < 16) ids[t][b] = ~ids[t][b];
        else        crcs[t][b-16] = ~crcs[t][b-16];
      end
      apply(ids, crcs, "random");
    end
    rst = 1; @(posedge clk); #1;
    check(1'b0, 4'b0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
