// Shared types and default sizes of the pipelined-scan fingerprint sensor.
// Analog quantities are carried as unsigned integer codes so that the
// behavioural models of the sensor cells and analog multiplexers can sit in the
// same simulation as the synthesizable scan driver:
//   volt_t : a node voltage in millivolts (0 .. 4095 mV)
//   cap_t  : a finger-to-plate capacitance in attofarads (0 .. 2047 aF)
// The default array (88 columns x 2 rows), the 8-deep pipeline and the
// 16-clock stagger between pipeline stages are the prototype's numbers.
package fps_pkg;
  localparam int unsigned N_COLS_DEF = 88;  // sensor columns (n)
  localparam int unsigned ROWS_DEF   = 2;   // sensor rows
  localparam int unsigned M_DEF      = 8;   // pipeline depth: column signal generators (m)
  localparam int unsigned SLOT_DEF   = 16;  // clocks between successive generator starts
  localparam int unsigned INT_W      = 8;   // width of the integration-interval setting

  typedef logic [11:0] volt_t;
  typedef logic [10:0] cap_t;

  // Supply rail of the 0.18 um process; the integrator output cannot exceed it.
  localparam int unsigned VDD_MV = 1800;
endpackage
