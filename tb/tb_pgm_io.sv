// tb_pgm_io: self-checking test of the programmable select I/O.
//
// For every PC code (each of the sixteen logic families) and both
// directions, with random data, it checks: the one-hot bank driver enable,
// the output signal appearing on the selected bank only, and the selected
// bank's input reaching in_sig. Expected values come from the family table
// (code i selects bank i), computed here independently of the module.
module tb_pgm_io;
  import hsio_pkg::*;

  logic [PC_W-1:0]         pc;
  logic                    out_en, out_sig, in_sig;
  logic [NUM_FAMILIES-1:0] bank_out, bank_oe, bank_in;
  int                      checks = 0, failures = 0;

  pgm_io dut (
    .pc(pc), .out_en(out_en), .out_sig(out_sig),
    .bank_out(bank_out), .bank_oe(bank_oe),
    .bank_in(bank_in), .in_sig(in_sig)
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic_family_e fam;
    logic [NUM_FAMILIES-1:0] exp_oe;
    for (int rep = 0; rep < 8; rep++) begin
      fam = fam.first();
      for (int k = 0; k < NUM_FAMILIES; k++) begin
        for (int d = 0; d < 2; d++) begin
          pc      = fam;
          out_en  = (d == 0);
          out_sig = 1'($urandom);
          bank_in = NUM_FAMILIES'($urandom);
          #1;
          exp_oe = '0;
          if (out_en) exp_oe = NUM_FAMILIES'(1) << k;
          checks++;
          if (bank_oe !== exp_oe) begin
            failures++;
            $display("FAIL %s oe=%h exp %h", fam.name(), bank_oe, exp_oe);
          end
          checks++;
          if (bank_out !== (out_sig ? exp_oe : '0)) begin
            failures++;
            $display("FAIL %s bank_out=%h", fam.name(), bank_out);
          end
          checks++;
          if (in_sig !== bank_in[k]) begin
            failures++;
            $display("FAIL %s in_sig=%b exp %b", fam.name(), in_sig, bank_in[k]);
          end
        end
        fam = fam.next();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
