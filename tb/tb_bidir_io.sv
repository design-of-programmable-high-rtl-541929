// tb_bidir_io: self-checking test of the two-buffer bidirectional cell.
//
// Each side has a testbench driver that can be switched off and a weak
// pull (x pulled up, y pulled down), so a side nobody drives reads the pull
// value. For every select value and data bit the testbench drives the
// input side only and checks that the output side carries the bit; it
// then drives nothing and checks that the cell copies the pull value
// from the input side, which shows the output side is not left floating
// and the input side is not driven by the cell.
module tb_bidir_io;

  logic sel;
  logic x_drv, x_val, y_drv, y_val;
  tri   x, y;
  int   checks = 0, failures = 0;

  assign x = x_drv ? x_val : 1'bz;
  assign y = y_drv ? y_val : 1'bz;
  pullup   (x);
  pulldown (y);

  bidir_io dut (.sel(sel), .x(x), .y(y));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (sel=%b)", what, got, exp, sel);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_drv = 0; y_drv = 0; x_val = 0; y_val = 0; sel = 0;
    for (int rep = 0; rep < 8; rep++) begin
      // Case 1: sel = 0, flow X -> Y
      sel = 1'b0; y_drv = 0; x_drv = 1;
      for (int b = 0; b < 2; b++) begin
        x_val = b[0];
        #1 check(y, x_val, "case1 y follows x");
        check(x, x_val, "case1 x keeps driven value");
      end
      x_drv = 0;
      #1 check(y, 1'b1, "case1 undriven x (pull-up) reaches y");
      // Case 2: sel = 1, flow Y -> X
      sel = 1'b1; x_drv = 0; y_drv = 1;
      for (int b = 0; b < 2; b++) begin
        y_val = b[0];
        #1 check(x, y_val, "case2 x follows y");
        check(y, y_val, "case2 y keeps driven value");
      end
      y_drv = 0;
      #1 check(x, 1'b0, "case2 undriven y (pull-down) reaches x");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
