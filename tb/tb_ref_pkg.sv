// tb_ref_pkg: reference models used by the RCEAT testbenches, written
// independently of the RTL.
//
// crc_ref computes the CRC as the remainder of the polynomial division
// id(x) * x^16 mod (x^16 + x^12 + x^5 + 1) over a 32-bit dividend; sort_ref is
// an insertion sort. known_msg holds the example message groups of the source
// design's simulation, five read cycles of four tags each.
package tb_ref_pkg;

  function automatic logic [15:0] crc_ref(input logic [15:0] id);
    logic [31:0] r;
    r = {id, 16'h0000};
    for (int b = 31; b >= 16; b--)
      if (r[b]) r = r ^ (32'h0001_1021 << (b - 16));
    return r[15:0];
  endfunction

  typedef logic [3:0][15:0] ids4_t;

  function automatic ids4_t sort_ref(input ids4_t v);
    logic [15:0] t;
    int j;
    for (int i = 1; i < 4; i++) begin
      t = v[i];
      j = i - 1;
      while (j >= 0 && v[j] > t) begin
        v[j+1] = v[j];
        j--;
      end
      v[j+1] = t;
    end
    return v;
  endfunction

  // Example groups {tag1, tag2, tag3, tag4}; groups 0 and 1 carry the CRC of
  // their IDs except tag 4 of group 0, groups 2 to 4 have wrong CRCs. The CRC
  // fields of the last group are filler values.
  localparam int NKNOWN = 5;
  localparam logic [31:0] KNOWN [NKNOWN][4] = '{
    '{32'h00c8_5844, 32'h0005_50a5, 32'h0010_1231, 32'hea60_95df},
    '{32'h00d0_cb7d, 32'h0006_60c6, 32'h0014_52b5, 32'hea6c_5253},
    '{32'h00d8_01ac, 32'h0007_b001, 32'h0018_cda0, 32'hea78_f0af},
    '{32'h0dd8_01ac, 32'h0001_b001, 32'h0081_cda0, 32'hea78_f0af},
    '{32'h0111_0000, 32'h0003_b001, 32'h0018_cda0, 32'hea78_f0af}
  };

endpackage
