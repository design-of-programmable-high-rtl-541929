// tb_io_buffer: self-checking test of the buffered bidirectional cell.
//
// Random sequences of sel (buffered or not), b1_en (send or receive),
// d1_in and a testbench-driven io line are applied on the falling clock
// edge. A reference model of the two flip-flops predicts every output;
// in particular a buffered bit must appear exactly one rising edge after
// it was applied. b2_out and d2_out carry pull-ups: while the cell sends,
// they must read 1 whatever the data, showing they float. The io line has
// a pull-down for the same check in the other direction.
module tb_io_buffer;

  logic clk = 0, rst_n;
  logic sel, b1_en, d1_in;
  logic q1_out, mux_out;
  logic io_drv, io_val;
  tri   io, b2_out, d2_out;
  logic m_q1, m_q2;         // reference flip-flops
  int   checks = 0, failures = 0;
  int   n_buf_tx = 0, n_buf_rx = 0;

  assign io = io_drv ? io_val : 1'bz;
  pulldown (io);
  pullup   (b2_out);
  pullup   (d2_out);

  io_buffer dut (
    .clk(clk), .rst_n(rst_n), .sel(sel), .b1_en(b1_en), .d1_in(d1_in),
    .q1_out(q1_out), .mux_out(mux_out), .io(io),
    .b2_out(b2_out), .d2_out(d2_out)
  );

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b (sel=%b b1_en=%b)",
               $time, what, got, exp, sel, b1_en);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q1 <= 0;
      m_q2 <= 0;
    end else begin
      m_q1 <= d1_in;
      m_q2 <= io;
    end
  end

  initial begin
    logic exp_mux;
    sel = 0; b1_en = 0; d1_in = 0; io_drv = 0; io_val = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(q1_out, 1'b0, "reset q1_out");

    // directed: one-clock latency of a buffered send
    @(negedge clk);
    sel = 1; b1_en = 1; d1_in = 1;
    #1 check(io, 1'b0, "buffered send: bit not yet through");
    @(posedge clk) #1 check(io, 1'b1, "buffered send: bit after one edge");
    check(q1_out, 1'b1, "q1_out after one edge");

    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      sel    = 1'($urandom);
      b1_en  = 1'($urandom);
      d1_in  = 1'($urandom);
      io_drv = ~b1_en;
      io_val = 1'($urandom);
      #1;
      check(q1_out, m_q1, "q1_out");
      exp_mux = sel ? m_q1 : d1_in;
      check(mux_out, exp_mux, "mux_out");
      if (b1_en) begin
        check(io, exp_mux, "io driven by b1");
        check(b2_out, 1'b1, "b2_out floats while sending");
        check(d2_out, 1'b1, "d2_out floats while sending");
        if (sel) n_buf_tx++;
      end else begin
        check(io, io_val, "io received");
        check(b2_out, io_val, "b2_out");
        check(d2_out, sel ? m_q2 : io_val, "d2_out");
        if (sel) n_buf_rx++;
      end
    end
    // receiving with nobody driving: io shows the pull-down, not the cell
    @(negedge clk);
    b1_en = 0; io_drv = 0; d1_in = 1; sel = 0;
    #1 check(io, 1'b0, "io not driven while receiving");
    checks++;
    if (n_buf_tx == 0 || n_buf_rx == 0) begin
      failures++;
      $display("FAIL a buffered direction never exercised");
    end
    $display("buffered sends %0d, buffered receives %0d", n_buf_tx, n_buf_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
