// qm_interconnect: the complete interconnect between two rows of the fabric.
//
// The outputs of the upper row form one list in queue order: unit c puts its
// n_out copies at positions out_base .. out_base+n_out-1 (for swap, the first
// position gets res0 and the second res1; for every other instruction all
// copies are res0). Unit c of the lower row then takes its first operand from
// position in_base and its second from in_base+1 of that list. Any position
// can reach any unit, which is the complete network the document assumes
// first. Purely combinational.
module qm_interconnect
  import qm_pkg::*;
#(
  parameter int COLS = 8
) (
  input  cfg_t          up_cfg  [COLS],
  input  logic [DW-1:0] up_res0 [COLS],
  input  logic [DW-1:0] up_res1 [COLS],
  input  cfg_t          dn_cfg  [COLS],
  output logic [DW-1:0] dn_a    [COLS],
  output logic [DW-1:0] dn_b    [COLS]
);
  localparam int SLOTS = COLS * MAXOUT;

  logic [DW-1:0] slot [SLOTS];

  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      slot[s] = '0;
      for (int c = 0; c < COLS; c++) begin
        if (up_cfg[c].valid
            && s >= int'(up_cfg[c].out_base)
            && s <  int'(up_cfg[c].out_base) + int'(n_out(up_cfg[c].ins)))
          slot[s] = (up_cfg[c].ins.op == OP_SWAP && s != int'(up_cfg[c].out_base))
                    ? up_res1[c] : up_res0[c];
      end
    end
    for (int c = 0; c < COLS; c++) begin
      dn_a[c] = (int'(dn_cfg[c].in_base)     < SLOTS) ? slot[int'(dn_cfg[c].in_base)]     : '0;
      dn_b[c] = (int'(dn_cfg[c].in_base) + 1 < SLOTS) ? slot[int'(dn_cfg[c].in_base) + 1] : '0;
    end
  end
endmodule
