// pgm_io: programmable select I/O -- routes one signal to or from one of
// sixteen logic-family I/O banks.
//
// The 4-bit programmable control PC selects the bank (TTL = 0 ... QRSL =
// 15, see hsio_pkg). In the output direction the core signal out_sig is
// demultiplexed onto bank_out[pc] and that bank's driver enable
// bank_oe[pc] is raised; every other bank sees 0 and a low enable. In the
// input direction the signal of the selected bank, bank_in[pc], is
// multiplexed onto in_sig. Both paths are combinational.
//
// The routing by PC follows the original I/O description. The separate
// one-hot driver enables and the out_en input that forces all enables
// low while the pin receives are this design's choice: they let each
// bank's tristate driver be switched from the same decode, so the
// selected bank's driver is enabled automatically.
module pgm_io
  import hsio_pkg::*;
(
  input  logic [PC_W-1:0]         pc,        // programmable control PC[3:0], a logic_family_e code
  input  logic                    out_en,    // 1: output direction active
  input  logic                    out_sig,   // signal from the core
  output logic [NUM_FAMILIES-1:0] bank_out,  // routed output, per bank
  output logic [NUM_FAMILIES-1:0] bank_oe,   // one-hot driver enable
  input  logic [NUM_FAMILIES-1:0] bank_in,   // signals from the banks
  output logic                    in_sig     // selected bank to the core
);

  logic [NUM_FAMILIES-1:0] dec;  // one-hot decode of pc

  always_comb begin
    dec = '0;
    dec[pc] = 1'b1;
  end

  always_comb begin
    bank_oe  = out_en ? dec : '0;
    bank_out = out_sig ? bank_oe : '0;
  end

  assign in_sig = bank_in[pc];

  // At most one bank may ever drive.
  always_comb begin
    assert ($onehot0(bank_oe))
      else $error("pgm_io: more than one bank driver enabled");
  end

endmodule
