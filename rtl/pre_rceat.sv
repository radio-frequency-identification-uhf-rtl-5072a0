// pre_rceat: pre-processing stage of the RCEAT identifier.
//
// Each 32-bit message is divided into the received ID (upper ID_W bits) and
// the received CRC (lower CRC_W bits); this division is plain wiring (the CRC
// remover of the source design). The ID and CRC of every tag go to the CRC
// checker, which raises sbit if any message of the group is corrupt. The IDs
// are passed on to the post-processing stage unregistered.
//
// Timing: id is combinational from msg; sbit and err are registered, one clock
// after msg. rst is synchronous, active high.
module pre_rceat
  import rceat_pkg::*;
#(
  parameter int unsigned N = NTAG
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic [N-1:0][MSG_W-1:0]     msg,    // incoming tag messages
  output logic [N-1:0][ID_W-1:0]      id,     // received IDs (CRC removed)
  output logic                        sbit,   // 1: some message of the group is corrupt
  output logic [N-1:0]                err     // per-tag CRC mismatch
);

  logic [N-1:0][CRC_W-1:0] rcrc;

  // CRC remover: split every message into ID and CRC.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      id[i]   = msg[i][MSG_W-1 -: ID_W];
      rcrc[i] = msg[i][CRC_W-1:0];
    end
  end

  crcchecker #(.N(N)) u_checker (
    .clk (clk),
    .rst (rst),
    .p   (id),
    .rcrc(rcrc),
    .sbit(sbit),
    .err (err)
  );

endmodule
