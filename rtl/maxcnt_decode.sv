// maxcnt_decode: finds the maxcnt instruction among the instructions that
// enter decode in a cycle and turns it into a MAXCOUNT register write.
//
// Each of the DECODE_W slots carries a valid bit and a 64-bit PISA
// instruction, slot 0 oldest. A slot holds maxcnt when its opcode byte equals
// cdr_pkg::MAXCNT_OPCODE; its 16-bit immediate is the new limit. If several
// slots hold maxcnt in one cycle, the youngest one wins, since it is the one
// that stays in force. The detection is combinational; the register it
// drives (in fetch_throttle) is written at the next clock edge. The opcode
// and operand field are this design's choice: only the existence of the
// instruction and its detection in the decoder are given.
module maxcnt_decode
  import cdr_pkg::*;
#(
  parameter int unsigned DECODE_W = 4
) (
  input  logic                       dec_valid [DECODE_W],
  input  pisa_inst_t                 dec_inst  [DECODE_W],
  output logic                       maxcnt_we,
  output logic [15:0]                maxcnt_val
);

  always_comb begin
    maxcnt_we  = 1'b0;
    maxcnt_val = '0;
    for (int unsigned s = 0; s < DECODE_W; s++) begin
      if (dec_valid[s] && is_maxcnt(dec_inst[s].a[7:0])) begin
        maxcnt_we  = 1'b1;
        maxcnt_val = dec_inst[s].b[15:0];
      end
    end
  end

endmodule
