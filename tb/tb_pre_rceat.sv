// tb_pre_rceat: self-checking test of the pre-processing stage.
// Checks that every message is split into ID (upper half) and CRC (lower
// half) at once, and that sbit/err report CRC errors one clock later, using
// the example groups of the source design and random messages.
module tb_pre_rceat;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][31:0] msg;
  logic [3:0][15:0] id;
  logic sbit;
  logic [3:0] err;
  int checks = 0, failures = 0;

  pre_rceat dut (.clk, .rst, .msg, .id, .sbit, .err);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0][31:0] m, input string what);
    logic [3:0] e;
    for (int i = 0; i < 4; i++) e[i] = (crc_ref(m[i][31:16]) != m[i][15:0]);
    msg = m;
    #1;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (id[i] !== m[i][31:16]) begin failures++; $display("FAIL %s: id[%0d]=%h", what, i, id[i]); end
    end
    @(posedge clk); #1;
    checks++;
    if (sbit !== |e || err !== e) begin
      failures++; $display("FAIL %s: sbit=%0d err=%b expected %b", what, sbit, err, e);
    end
  endtask

  initial begin
    logic [3:0][31:0] m;
    msg = '0;
    repeat (2) @(posedge clk); #1;
    checks++; if (sbit !== 1'b0 || err !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int g = 0; g < NKNOWN; g++) begin
      for (int i = 0; i < 4; i++) m[i] = KNOWN[g][i];
      apply(m, "example");
    end
    // Group 1 of the examples is error free.
    for (int i = 0; i < 4; i++) m[i] = KNOWN[1][i];
    apply(m, "example good");
    checks++; if (sbit !== 1'b0) begin failures++; $display("FAIL good group flagged"); end
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) begin
        m[i][31:16] = 16'($urandom);
        m[i][15:0]  = (($urandom % 5) == 0) ? 16'($urandom) : crc_ref(m[i][31:16]);
      end
      apply(m, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
