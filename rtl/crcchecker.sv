// crcchecker: CRC checker and status bit of the pre-processing stage.
//
// For each of the NTAG tags of a read cycle it recomputes the CRC of the
// received ID (rceat_pkg::crc_of, CRC-16 0x1021) and compares it with the CRC
// field that arrived with it. A tag whose two CRCs differ is flagged in err[i];
// sbit is the OR of the flags, so sbit = 0 means the whole group arrived
// without error and sbit = 1 means at least one message is corrupt.
//
// Timing: both outputs are registered on the rising clock edge, one clock after
// the inputs; rst is synchronous and active high and clears them to 0.
//
// Following the source design: the recompute-and-compare check and a single
// status bit that is 0 for a good group. Its text gives the error value as
// "two"; a one-bit status is kept here, matching the single-bit sbit port of
// its schematic. The per-tag err vector and the reset behaviour are this
// design's own choices.
module crcchecker
  import rceat_pkg::*;
#(
  parameter int unsigned N = NTAG
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N-1:0][ID_W-1:0]      p,      // received IDs
  input  logic [N-1:0][CRC_W-1:0]     rcrc,   // received CRCs
  output logic                        sbit,   // 1: some message of the group is corrupt
  output logic [N-1:0]                err     // per-tag CRC mismatch
);

  logic [N-1:0] mismatch;

  always_comb begin
    for (int i = 0; i < N; i++)
      mismatch[i] = (crc_of(p[i]) != rcrc[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sbit <= 1'b0;
      err  <= '0;
    end else begin
      sbit <= |mismatch;
      err  <= mismatch;
    end
  end

endmodule
