// prepostrceat: RCEAT (reliable and cost-effective anti-collision technique)
// identifier for UHF RFID tags.
//
// Four tags answer in each read cycle, each with a 32-bit message: a 16-bit ID
// and the 16-bit CRC of that ID. The pre stage splits every message and checks
// its CRC; sbit reports whether the group held a corrupt message. The post
// stage orders the four IDs from smallest to largest in a single clock and
// sends them out one per clock on tag_out, each with its kill-tag word
// {1, ID} on tag_kill, which acknowledges and silences the tag just read.
// A read cycle is therefore four clocks long, and the four tags of a group are
// resolved in one cycle instead of through rounds of collisions.
//
// Interface: message[i] is the message of tag i (message1..message4 of the
// source design are message[0..3]); clk, rst (synchronous, active high).
// Timing, counting the first rising edge after rst falls as edge 1: group g
// must be on message from before edge 4g+1 until after edge 4g+4; sbit and
// tag_err describe group g from edge 4g+1 to edge 4g+5; sorted word k of
// group g is on tag_out / tag_kill from edge 4g+2+k to edge 4g+3+k.
//
// As in the schematic of the source design, the IDs reach the post stage
// whatever the CRC result: sbit is reported beside the identified IDs, and a
// reader discards a group whose sbit is 1. Its text instead says only
// error-free messages are passed on; see the accompanying documentation. The
// per-tag error flags tag_err and the phase output are additions of this
// design.
module prepostrceat
  import rceat_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  input  logic [NTAG-1:0][MSG_W-1:0]  message,   // tag messages {ID, CRC}
  output logic                        sbit,      // 1: group has a CRC error
  output logic [NTAG-1:0]             tag_err,   // per-tag CRC error
  output logic [ID_W-1:0]             tag_out,   // identified ID, one per clock
  output logic [ID_W:0]               tag_kill,  // kill-tag word {1, ID}
  output logic [$clog2(NTAG+1)-1:0]   phase      // serializer state, 0 idle
);

  logic [NTAG-1:0][ID_W-1:0] id;

  pre_rceat #(.N(NTAG)) u_pre (
    .clk (clk),
    .rst (rst),
    .msg (message),
    .id  (id),
    .sbit(sbit),
    .err (tag_err)
  );

  post_rceat #(.N(NTAG), .W(ID_W)) u_post (
    .clk     (clk),
    .rst     (rst),
    .id      (id),
    .tag_out (tag_out),
    .tag_kill(tag_kill),
    .phase   (phase)
  );

endmodule
