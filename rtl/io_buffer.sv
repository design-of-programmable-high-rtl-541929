// io_buffer: bidirectional I/O cell with selectable buffering.
//
// Output direction (b1_en = 1): d1_in is captured every rising clock edge
// by the buffer flip-flop (q1_out). The multiplexer picks d1_in (sel = 0,
// unbuffered) or q1_out (sel = 1, buffered: d1_in delayed by one clock)
// as mux_out, and tristate buffer b1 drives mux_out onto the io line.
//
// Input direction (b1_en = 0): b1 is off, and tristate buffer b2, enabled
// through an inverter by ~b1_en, passes the io line to b2_out. The
// received data leaves on d2_out, also through a tristate driver enabled
// with b2: unbuffered (sel = 0) or through a second flip-flop (sel = 1,
// one clock of delay). While b1 drives, b2_out and d2_out float.
//
// The output half (flip-flop, mux, b1) and the sel / b1_en behaviour
// follow the original I/O description. The input half mirrors it by
// this design's choice, and so does the asynchronous active-low reset,
// which clears both flip-flops to 0.
module io_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic sel,      // 0: unbuffered, 1: buffered
  input  logic b1_en,    // 1: drive io (output), 0: receive io (input)
  input  logic d1_in,    // data to send
  output logic q1_out,   // buffer flip-flop of the output path
  output logic mux_out,  // selected output data
  inout  tri   io,       // bidirectional line, b1_out
  output tri   b2_out,   // received line, floats while b1 drives
  output tri   d2_out    // received data, floats while b1 drives
);

  logic b2_en;  // inverter output
  logic q2;     // buffer flip-flop of the input path
  logic io_rx;  // value seen on the io line

  assign b2_en = ~b1_en;
  assign io_rx = io;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1_out <= 1'b0;
      q2     <= 1'b0;
    end else begin
      q1_out <= d1_in;
      q2     <= io_rx;
    end
  end

  assign mux_out = sel ? q1_out : d1_in;

  // b1: output driver
  assign io     = b1_en ? mux_out : 1'bz;
  // b2: input receiver and the received-data driver
  assign b2_out = b2_en ? io_rx : 1'bz;
  assign d2_out = b2_en ? (sel ? q2 : io_rx) : 1'bz;

endmodule
