// tb_rceat_example: replays the worked example of the original design on the
// full-size identifier and compares the output stream word for word.
//
// Five read cycles of four messages each are applied, one group per four
// clocks, starting right after reset. The expected TAG_OUT stream, taken from
// the original example, is
//   0000 | 0005 0010 00c8 ea60 | 0006 0014 00d0 ea6c | 0007 0018 00d8 ea78 |
//   0001 0081 0dd8 ea78 | 0003 ...
// (the leading 0000 is the idle clock after reset), with TAG_KILL = {1, ID}
// for every identified word, e.g. 100d0 while TAG_OUT is 00d0. The status bit
// must be 0 only for the second group, the one whose CRCs all match.
module tb_rceat_example;
  import tb_ref_pkg::*;

  localparam int NOUT = 18;
  localparam logic [15:0] EXP_OUT [NOUT] = '{
    16'h0000,
    16'h0005, 16'h0010, 16'h00c8, 16'hea60,
    16'h0006, 16'h0014, 16'h00d0, 16'hea6c,
    16'h0007, 16'h0018, 16'h00d8, 16'hea78,
    16'h0001, 16'h0081, 16'h0dd8, 16'hea78,
    16'h0003
  };
  localparam logic EXP_SBIT [NKNOWN] = '{1'b1, 1'b0, 1'b1, 1'b1, 1'b1};

  logic clk = 0, rst = 1;
  logic [3:0][31:0] message;
  logic sbit;
  logic [3:0] tag_err;
  logic [15:0] tag_out;
  logic [16:0] tag_kill;
  logic [2:0]  phase;
  int checks = 0, failures = 0;

  prepostrceat dut (.clk, .rst, .message, .sbit, .tag_err, .tag_out, .tag_kill, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    message = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int n = 1; n <= NOUT; n++) begin
      if ((n - 1) % 4 == 0 && (n - 1) / 4 < NKNOWN)
        for (int i = 0; i < 4; i++) message[i] = KNOWN[(n - 1) / 4][i];
      @(posedge clk); #1;
      checks++;
      if (tag_out !== EXP_OUT[n - 1]) begin
        failures++; $display("FAIL clock %0d: TAG_OUT=%h expected %h", n, tag_out, EXP_OUT[n - 1]);
      end
      checks++;
      if (n >= 2 && tag_kill !== {1'b1, EXP_OUT[n - 1]}) begin
        failures++; $display("FAIL clock %0d: TAG_KILL=%h", n, tag_kill);
      end
      if ((n - 1) / 4 < NKNOWN) begin
        checks++;
        if (sbit !== EXP_SBIT[(n - 1) / 4]) begin
          failures++; $display("FAIL clock %0d: sbit=%0d expected %0d", n, sbit, EXP_SBIT[(n - 1) / 4]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
