// puf_pkg: constants and small helper functions shared by the RO-PUF ID
// extraction and authentication blocks.
//
// The defaults describe the main configuration: 32 ring oscillators, 24-bit
// ring counts (m), 24-bit neighbour differences (k), a 20 ms measurement
// window and 255 samples per run. The 50 MHz system clock and the serial
// rate are choices of this implementation.
`timescale 1ps / 1ps
package puf_pkg;

  localparam int unsigned N_RO_DEFAULT     = 32;        // rings in the array
  localparam int unsigned M_BITS_DEFAULT   = 24;        // raw count width (m)
  localparam int unsigned K_BITS_DEFAULT   = 24;        // ID element width (k)
  localparam int unsigned CLK_HZ_DEFAULT   = 50_000_000;
  localparam int unsigned WINDOW_DEFAULT   = CLK_HZ_DEFAULT / 50;  // 20 ms
  localparam int unsigned SAMPLES_DEFAULT  = 255;
  localparam int unsigned BAUD_DEFAULT     = 115_200;
  localparam int unsigned DB_DEFAULT       = 6;
  localparam int unsigned K_MEA_DEFAULT    = 50;        // 1 / 20 ms
  localparam int unsigned K_NORM_DEFAULT   = 20;
  localparam int unsigned D_TH_E4_DEFAULT  = 181;       // 0.0181

  // Frame header bytes of the serial readout.
  localparam logic [7:0] HDR_ID  = 8'hA5;
  localparam logic [7:0] HDR_RAW = 8'h5A;

  // Largest squared Euclidean distance, in counts^2, that still counts as a
  // match:  k_mea^2 * dsq * 1e8 <= th_e4^2 * 2^(2*k_norm) * n_id.
  function automatic logic [63:0] dist_sq_threshold(input int unsigned k_mea,
                                                     input int unsigned k_norm,
                                                     input int unsigned th_e4,
                                                     input int unsigned n_id);
    logic [127:0] rhs, lhs_unit;
    rhs      = (128'(th_e4) * 128'(th_e4) * 128'(n_id)) << (2 * k_norm);
    lhs_unit = 128'(k_mea) * 128'(k_mea) * 128'd100_000_000;
    return 64'(rhs / lhs_unit);
  endfunction

endpackage
