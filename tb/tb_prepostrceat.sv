// tb_prepostrceat: end-to-end test of the RCEAT identifier at its full size.
//
// Runs read cycles of four tag messages through the whole design: first the
// five example groups of the source design, then random groups in which each
// message is either correct or carries a corrupted CRC or ID. For every group
// it checks sbit and tag_err (from one clock after the group is presented),
// and the four IDs on tag_out smallest first with tag_kill = {1, ID}, one per
// clock starting two clocks after the group. A reset in the middle of the run
// must bring the design back to idle. The test counts how often each
// mechanism occurred (error-free group, group with a CRC error, group that had
// to be reordered, group with repeated IDs, serializer wrap from the last word
// to the first, idle state after reset) and fails if one never did.
module tb_prepostrceat;
  import tb_ref_pkg::*;

  localparam int NG = 400;

  logic clk = 0, rst = 1;
  logic [3:0][31:0] message;
  logic sbit;
  logic [3:0] tag_err;
  logic [15:0] tag_out;
  logic [16:0] tag_kill;
  logic [2:0]  phase;
  int checks = 0, failures = 0;
  int n_good = 0, n_bad = 0, n_reorder = 0, n_tie = 0, n_wrap = 0, n_idle = 0;

  logic [3:0][31:0] groups [NG];
  ids4_t sorted [NG];
  logic [3:0] errs [NG];

  prepostrceat dut (.clk, .rst, .message, .sbit, .tag_err, .tag_out, .tag_kill, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NG + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && phase == 3'd4) n_wrap++;

  task automatic make_groups();
    ids4_t ids;
    for (int g = 0; g < NG; g++) begin
      for (int i = 0; i < 4; i++) begin
        if (g < NKNOWN) groups[g][i] = KNOWN[g][i];
        else begin
          groups[g][i][31:16] = (g % 5 == 0) ? 16'($urandom_range(1, 3)) : 16'($urandom);
          groups[g][i][15:0]  = crc_ref(groups[g][i][31:16]);
          if ($urandom_range(0, 9) == 0) begin
            automatic int b = $urandom_range(0, 31);
            groups[g][i][b] = ~groups[g][i][b];
          end
        end
        ids[i]     = groups[g][i][31:16];
        errs[g][i] = (crc_ref(ids[i]) != groups[g][i][15:0]);
      end
      sorted[g] = sort_ref(ids);
      if (|errs[g]) n_bad++; else n_good++;
      if (sorted[g] != ids) n_reorder++;
      for (int k = 0; k < 3; k++)
        if (sorted[g][k] == sorted[g][k+1]) begin n_tie++; break; end
    end
  endtask

  // Run groups [first, last] from reset release.
  task automatic run(input int first, input int last);
    int ng = last - first + 1;
    for (int n = 1; n <= 4 * ng + 1; n++) begin
      if ((n - 1) % 4 == 0 && (n - 1) / 4 < ng) message = groups[first + (n - 1) / 4];
      @(posedge clk); #1;
      if (n <= 4 * ng) begin
        automatic int g = first + (n - 1) / 4;
        checks++;
        if (sbit !== (|errs[g]) || tag_err !== errs[g]) begin
          failures++; $display("FAIL group %0d: sbit=%0d tag_err=%b expected %b", g, sbit, tag_err, errs[g]);
        end
      end
      if (n >= 2) begin
        automatic int g = first + (n - 2) / 4;
        automatic int k = (n - 2) % 4;
        checks++;
        if (tag_out !== sorted[g][k] || tag_kill !== {1'b1, sorted[g][k]}) begin
          failures++;
          $display("FAIL group %0d word %0d: tag_out=%h tag_kill=%h expected %h", g, k, tag_out, tag_kill, sorted[g][k]);
        end
      end
    end
  endtask

  task automatic check_idle();
    checks++;
    if (phase !== 3'd0 || tag_out !== '0 || tag_kill !== '0 || sbit !== 1'b0) begin
      failures++; $display("FAIL not idle in reset");
    end else n_idle++;
  endtask

  initial begin
    make_groups();
    message = '0;
    repeat (3) @(posedge clk); #1;
    check_idle();
    rst = 0;
    // The first example group must be read out as 0005 0010 00c8 ea60.
    run(0, NG / 2 - 1);
    checks++;
    if (sorted[0] != '{16'hea60, 16'h00c8, 16'h0010, 16'h0005}) begin failures++; $display("FAIL reference"); end
    rst = 1;
    @(posedge clk); #1;
    check_idle();
    rst = 0;
    run(NG / 2, NG - 1);
    $display("groups: error-free %0d, with CRC error %0d, reordered %0d, with repeated IDs %0d; serializer wraps %0d; idle after reset %0d",
             n_good, n_bad, n_reorder, n_tie, n_wrap, n_idle);
    checks += 6;
    if (n_good == 0)    begin failures++; $display("FAIL no error-free group"); end
    if (n_bad == 0)     begin failures++; $display("FAIL no group with error"); end
    if (n_reorder == 0) begin failures++; $display("FAIL no reordering"); end
    if (n_tie == 0)     begin failures++; $display("FAIL no repeated IDs"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no serializer wrap"); end
    if (n_idle == 0)    begin failures++; $display("FAIL no idle state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
