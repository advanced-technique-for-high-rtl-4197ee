// tdc_pkg -- constants and types shared by the tuneable ring-oscillator vernier TDC.
//
// The oscillators are chains of N_CELLS "moving inverter" cells (XOR gates whose
// second input selects pass or invert). An 8-bit select word is used throughout,
// as in the reference design; a select word must hold an odd number of ones for
// the ring to oscillate.
//
// The per-cell delays below feed the behavioural oscillator model only; synthesis
// ignores them. They are built from the measured LUT-input delays of an FPGA logic
// cell (input D 177 ps, C 324 ps, B 494 ps, rising edge) plus a 240 ps routing
// hop, with the cells ordered as three D-input, three C-input and two B-input
// XORs. The invert path of each cell is made faster than its pass path by the
// per-cell (Tpass - Tinv) spread measured on such a chain: 15, 16, 38, 82, 87, 90,
// 158 and 158 ps. Cell 0 is the first cell after the enable gate and is driven by
// select bit N_CELLS-1.
//
// Not every module uses every constant here (the delay tables and default select
// words are only read by the oscillator-based blocks), so a lint tool compiling
// this package with a single small module reports them as unused.
package tdc_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_CELLS = 8;   // cells per oscillator
  localparam int unsigned CNT_W   = 16;  // width of the N0 / N1 / beat counters
  localparam int unsigned REF_W   = 16;  // width of the calibration window length N_ref
  localparam int unsigned CAL_W   = 24;  // width of the calibration period counts N_calib
  localparam int unsigned INV_SEL = 3;   // inverters per select word in the calibration sweep

  typedef int unsigned delay_tab_t [N_CELLS];

  // Pass and invert delays, ps, cell 0 (after the AND gate) first.
  localparam delay_tab_t TPASS_PS_DEF = '{417, 417, 417, 564, 564, 564, 734, 734};
  localparam delay_tab_t TINV_PS_DEF  = '{402, 401, 379, 482, 477, 474, 576, 576};
  // Delay of the enable AND gate (one logic cell on input D plus routing), ps.
  localparam int unsigned TAND_PS_DEF = 417;

  // Oscillator selections of the 50 ps example TDC (slow = 148, fast = 22).
  localparam logic [N_CELLS-1:0] SEL_SLOW_DEF = 8'd148;
  localparam logic [N_CELLS-1:0] SEL_FAST_DEF = 8'd22;

  // One vernier measurement: T = N0*T0 - N1*T1 = T0*(N0-N1) + N1*dt.
  typedef struct packed {
    logic [CNT_W-1:0] n0;   // slow oscillator periods
    logic [CNT_W-1:0] n1;   // fast oscillator periods
  } tdc_result_t;

  // One line of the calibration table produced by the sweep.
  typedef struct packed {
    logic [N_CELLS-1:0] sel_slow;
    logic [N_CELLS-1:0] sel_fast;
    logic [CAL_W-1:0]   n_calib_slow;   // slow periods in N_ref reference periods
    logic [CAL_W-1:0]   n_calib_fast;   // fast periods in N_ref reference periods
    logic [CNT_W-1:0]   beat;           // fast periods between two coincidences
    logic               beat_ok;        // beat measured before the timeout
  } sweep_rec_t;

endpackage
