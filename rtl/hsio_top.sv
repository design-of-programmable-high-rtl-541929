// hsio_top: one programmable high-speed I/O -- a core-side data bit that
// can be sent to, or received from, any of sixteen logic-family pad
// banks, buffered or not.
//
// Chain, core side to pad side:
//
//   core_out/core_in <-> io_buffer <-> line <-> pgm_io <-> bank[i] <-> bidir_io[i] <-> pad[i]
//
//   * io_buffer (buffering cell) adds one clock of latency when
//     buf_sel = 1 and is the driver or receiver of the internal line;
//   * pgm_io decodes pc (hsio_pkg::logic_family_e) into a one-hot bank
//     enable, routes the line to bank pc when sending and selects bank pc
//     when receiving;
//   * one bidir_io per bank sets that bank's direction: the enabled bank
//     drives its pad (X -> Y); every other bank, and every bank while
//     receiving, lets its pad drive the bank line (Y -> X), so the chip
//     drives at most one pad at a time.
//
// dir = 0 sends: pad[pc] = core_out, directly or one clock later.
// dir = 1 receives: core_in = pad[pc], directly or one clock later;
// core_in is 0 while sending. Changing pc or dir takes effect at once
// (combinational); a buffered path shows the new setting's data after the
// next rising clock edge.
//
// The three cells and the sixteen selectable families follow the original
// I/O description. How they are chained here, the one bidirectional cell
// per bank and the reset are this design's choices; the analog drivers
// of each I/O standard sit outside, on the pad[] ports.
//
// Lint (UNOPTFLAT in Verilator) flags the bidirectional bank lines as
// possible combinational loops; the tristate enables are mutually
// exclusive, so no loop exists.
module hsio_top
  import hsio_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PC_W-1:0]         pc,        // logic family / bank select
  input  logic                    dir,       // io_dir_e: 0 send, 1 receive
  input  logic                    buf_sel,   // io_path_e: 0 direct, 1 buffered
  input  logic                    core_out,  // data from the core
  output logic                    core_in,   // data to the core
  output logic [NUM_FAMILIES-1:0] bank_oe,   // which bank drives its pad
  inout  tri   [NUM_FAMILIES-1:0] pad        // one pad per bank
);

  tri                      line;       // io_buffer <-> pgm_io
  tri                      rx_data;    // io_buffer d2_out
  tri  [NUM_FAMILIES-1:0]  bank;       // pgm_io side of each bidir_io
  logic [NUM_FAMILIES-1:0] bank_out;
  logic                    line_tx;    // value on the line, to pgm_io
  logic                    line_rx;    // selected bank, to the line
  logic                    sending;

  assign sending = (dir == DIR_OUT);

  // q1_out, mux_out and b2_out are observation taps of the cell; the
  // chain needs only its io line and d2_out.
  io_buffer u_buffer (
    .clk     (clk),
    .rst_n   (rst_n),
    .sel     (buf_sel),
    .b1_en   (sending),
    .d1_in   (core_out),
    .q1_out  (),
    .mux_out (),
    .io      (line),
    .b2_out  (),
    .d2_out  (rx_data)
  );

  // The selected bank drives the line while receiving.
  assign line    = sending ? 1'bz : line_rx;
  assign line_tx = line;

  pgm_io u_select (
    .pc       (pc),
    .out_en   (sending),
    .out_sig  (line_tx),
    .bank_out (bank_out),
    .bank_oe  (bank_oe),
    .bank_in  (bank),
    .in_sig   (line_rx)
  );

  for (genvar i = 0; i < NUM_FAMILIES; i++) begin : g_bank
    // pgm_io's driver onto the bank line
    assign bank[i] = bank_oe[i] ? bank_out[i] : 1'bz;

    // sel = 0: bank -> pad (send), sel = 1: pad -> bank (receive)
    bidir_io u_dir (
      .sel (~bank_oe[i]),
      .x   (bank[i]),
      .y   (pad[i])
    );
  end

  assign core_in = sending ? 1'b0 : rx_data;

endmodule
