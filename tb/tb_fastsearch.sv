// tb_fastsearch: self-checking test of the fast search.
// Applies the example groups of the source design (e.g. 00c8 0005 0010 ea60
// must come out as 0005 0010 00c8 ea60), groups with repeated IDs, every
// permutation of four distinct IDs, and random groups. The sorted outputs must
// appear exactly one clock after the inputs, and stay zero in reset.
module tb_fastsearch;
  import tb_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [3:0][15:0] a, s;
  int checks = 0, failures = 0;

  fastsearch dut (.clk, .rst, .a, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input ids4_t v, input string what);
    ids4_t exp, prev;
    exp = sort_ref(v);
    prev = s;
    a = v;
    #1;
    checks++;
    if (s !== prev) begin failures++; $display("FAIL %s: output changed before clock", what); end
    @(posedge clk); #1;
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %s: in %h %h %h %h out %h %h %h %h exp %h %h %h %h", what,
               v[0], v[1], v[2], v[3], s[0], s[1], s[2], s[3], exp[0], exp[1], exp[2], exp[3]);
    end
  endtask

  initial begin
    ids4_t v;
    a = '{16'h1, 16'h2, 16'h3, 16'h4};
    repeat (2) @(posedge clk); #1;
    checks++; if (s !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    // Worked example: inputs a=00c8 b=0005 c=0010 d=ea60 (a is element 0).
    apply('{16'hea60, 16'h0010, 16'h0005, 16'h00c8}, "example 1");
    checks++;
    if (s[0] !== 16'h0005 || s[1] !== 16'h0010 || s[2] !== 16'h00c8 || s[3] !== 16'hea60) begin
      failures++; $display("FAIL example order");
    end
    for (int g = 0; g < NKNOWN; g++) begin
      for (int i = 0; i < 4; i++) v[i] = KNOWN[g][i][31:16];
      apply(v, "examples");
    end
    apply('{16'h7, 16'h7, 16'h7, 16'h7}, "all equal");
    apply('{16'h0, 16'hffff, 16'h0, 16'hffff}, "two pairs");
    apply('{16'h9, 16'h3, 16'h9, 16'h1}, "one pair");
    // All 24 orders of four distinct values.
    for (int i0 = 0; i0 < 4; i0++)
      for (int i1 = 0; i1 < 4; i1++)
        for (int i2 = 0; i2 < 4; i2++)
          for (int i3 = 0; i3 < 4; i3++)
            if (i0 != i1 && i0 != i2 && i0 != i3 && i1 != i2 && i1 != i3 && i2 != i3) begin
              v = '{16'(100 * i3 + 5), 16'(100 * i2 + 5), 16'(100 * i1 + 5), 16'(100 * i0 + 5)};
              apply(v, "permutation");
            end
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) v[i] = (n % 3 == 0) ? 16'($urandom_range(0, 3)) : 16'($urandom);
      apply(v, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
