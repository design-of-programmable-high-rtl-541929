// hsio_pkg: types and constants shared by the programmable I/O blocks.
//
// The programmable control word PC[3:0] selects one of sixteen I/O
// standards ("logic families"); each has its own pad bank. The code
// points below are the ones of the design's selection table, TTL = 0 up
// to QRSL = 15. The direction and buffering encodings are this design's
// own naming of the select lines the cells use.
package hsio_pkg;

  localparam int unsigned NUM_FAMILIES = 16;
  localparam int unsigned PC_W         = $clog2(NUM_FAMILIES);

  typedef enum logic [PC_W-1:0] {
    FAM_TTL    = 4'd0,
    FAM_LVTTL  = 4'd1,
    FAM_LVCMOS = 4'd2,
    FAM_LVDS   = 4'd3,
    FAM_I2C    = 4'd4,
    FAM_HSTL   = 4'd5,
    FAM_SSTL   = 4'd6,
    FAM_SMBUS  = 4'd7,
    FAM_PCI    = 4'd8,
    FAM_BLVDS  = 4'd9,
    FAM_RSDS   = 4'd10,
    FAM_TMDS   = 4'd11,
    FAM_PPDS   = 4'd12,
    FAM_GTL    = 4'd13,
    FAM_LVPECL = 4'd14,
    FAM_QRSL   = 4'd15
  } logic_family_e;

  // Direction of a pin as seen from the chip core.
  typedef enum logic {
    DIR_OUT = 1'b0,   // core drives the pad
    DIR_IN  = 1'b1    // pad drives the core
  } io_dir_e;

  // Buffering of the data path.
  typedef enum logic {
    PATH_DIRECT   = 1'b0,  // combinational, no added latency
    PATH_BUFFERED = 1'b1   // through a flip-flop, one clock of latency
  } io_path_e;

endpackage
