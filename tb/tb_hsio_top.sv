// tb_hsio_top: end-to-end test of the programmable I/O at its full size
// (sixteen logic-family banks).
//
// Every pad has a testbench driver that can be switched off and a
// pull-up. On each falling clock edge the testbench picks a family
// (pc), a direction, direct or buffered data, a core bit and pad values,
// and drives a random subset of the pads that the chip is not meant to
// drive. A reference model with its own two flip-flops predicts the
// pads and core_in; a buffered bit must arrive exactly one rising edge
// after it was applied.
//
// Checks: the selected pad carries core data while sending and every
// other pad shows its own driver or the pull-up (the chip drives one pad
// at most); core_in is the selected pad while receiving, 0 while sending;
// bank_oe is one-hot on pc while sending and all zero while receiving.
// It counts each mechanism: direct and buffered sends and receives,
// direction turnarounds, family changes and use of every family in both
// directions; one that never happened is a failure.
module tb_hsio_top;
  import hsio_pkg::*;

  logic                    clk = 0, rst_n;
  logic [PC_W-1:0]         pc;
  logic                    dir, buf_sel, core_out, core_in;
  logic [NUM_FAMILIES-1:0] bank_oe;
  logic [NUM_FAMILIES-1:0] pad_drv, pad_val;
  tri   [NUM_FAMILIES-1:0] pad;

  logic m_q1, m_q2, m_line;
  int   checks = 0, failures = 0;
  int   n_tx_direct = 0, n_tx_buf = 0, n_rx_direct = 0, n_rx_buf = 0;
  int   n_turnaround = 0, n_fam_change = 0;
  int   fam_tx [NUM_FAMILIES];
  int   fam_rx [NUM_FAMILIES];

  for (genvar i = 0; i < NUM_FAMILIES; i++) begin : g_pad
    assign pad[i] = pad_drv[i] ? pad_val[i] : 1'bz;
    pullup (pad[i]);
  end

  hsio_top dut (
    .clk(clk), .rst_n(rst_n), .pc(pc), .dir(dir), .buf_sel(buf_sel),
    .core_out(core_out), .core_in(core_in), .bank_oe(bank_oe), .pad(pad)
  );

  always #5 clk = ~clk;

  // reference model: value on the internal line and the two flip-flops
  always_comb begin
    if (dir == DIR_OUT) m_line = buf_sel ? m_q1 : core_out;
    else                m_line = pad_drv[pc] ? pad_val[pc] : 1'b1;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q1 <= 0;
      m_q2 <= 0;
    end else begin
      m_q1 <= core_out;
      m_q2 <= m_line;
    end
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b (pc=%0d dir=%b buf=%b)",
               $time, what, got, exp, pc, dir, buf_sel);
    end
  endtask

  task automatic check_cycle();
    logic exp;
    logic [NUM_FAMILIES-1:0] exp_oe;
    exp_oe = (dir == DIR_OUT) ? NUM_FAMILIES'(1) << pc : '0;
    checks++;
    if (bank_oe !== exp_oe) begin
      failures++;
      $display("FAIL %0t bank_oe=%h expected %h", $time, bank_oe, exp_oe);
    end
    if (dir == DIR_OUT) begin
      exp = buf_sel ? m_q1 : core_out;
      for (int i = 0; i < NUM_FAMILIES; i++) begin
        if (i == int'(pc)) check(pad[i], exp, "selected pad sends core data");
        else check(pad[i], pad_drv[i] ? pad_val[i] : 1'b1, "other pad left alone");
      end
      check(core_in, 1'b0, "core_in low while sending");
    end else begin
      exp = buf_sel ? m_q2 : (pad_drv[pc] ? pad_val[pc] : 1'b1);
      check(core_in, exp, "core_in receives selected pad");
      for (int i = 0; i < NUM_FAMILIES; i++)
        check(pad[i], pad_drv[i] ? pad_val[i] : 1'b1, "pad not driven while receiving");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PC_W-1:0] last_pc;
    logic            last_dir;
    foreach (fam_tx[i]) begin fam_tx[i] = 0; fam_rx[i] = 0; end
    pc = FAM_TTL; dir = DIR_OUT; buf_sel = PATH_DIRECT; core_out = 0;
    pad_drv = '0; pad_val = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // directed: buffered send on LVDS, bit appears one edge later
    pc = FAM_LVDS; dir = DIR_OUT; buf_sel = PATH_BUFFERED; core_out = 1;
    #1 check(pad[FAM_LVDS], 1'b0, "buffered send: not yet through");
    @(posedge clk) #1 check(pad[FAM_LVDS], 1'b1, "buffered send: after one edge");
    // directed: buffered receive on TMDS
    @(negedge clk);
    dir = DIR_IN; pc = FAM_TMDS; pad_drv = '0;
    pad_drv[FAM_TMDS] = 1; pad_val[FAM_TMDS] = 0;
    @(negedge clk);
    pad_val[FAM_TMDS] = 1;
    #1 check(core_in, 1'b0, "buffered receive: not yet through");
    @(posedge clk) #1 check(core_in, 1'b1, "buffered receive: after one edge");

    last_pc = pc; last_dir = dir;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) dir = 1'($urandom);
      if ($urandom_range(3) == 0) pc  = PC_W'($urandom);
      buf_sel  = 1'($urandom);
      core_out = 1'($urandom);
      pad_val  = NUM_FAMILIES'($urandom);
      pad_drv  = NUM_FAMILIES'($urandom);
      if (dir == DIR_OUT) pad_drv[pc] = 1'b0;   // never fight the chip
      #1 check_cycle();
      if (dir != last_dir) n_turnaround++;
      if (pc  != last_pc)  n_fam_change++;
      last_dir = dir; last_pc = pc;
      if (dir == DIR_OUT) begin
        fam_tx[pc]++;
        if (buf_sel) n_tx_buf++; else n_tx_direct++;
      end else begin
        fam_rx[pc]++;
        if (buf_sel) n_rx_buf++; else n_rx_direct++;
      end
    end

    $display("sends direct %0d buffered %0d, receives direct %0d buffered %0d",
             n_tx_direct, n_tx_buf, n_rx_direct, n_rx_buf);
    $display("direction turnarounds %0d, family changes %0d", n_turnaround, n_fam_change);
    checks++;
    if (n_tx_direct == 0 || n_tx_buf == 0 || n_rx_direct == 0 || n_rx_buf == 0 ||
        n_turnaround == 0 || n_fam_change == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    for (int i = 0; i < NUM_FAMILIES; i++) begin
      logic_family_e fam;
      fam = logic_family_e'(i);
      checks++;
      if (fam_tx[i] == 0 || fam_rx[i] == 0) begin
        failures++;
        $display("FAIL family %s not used in both directions", fam.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
