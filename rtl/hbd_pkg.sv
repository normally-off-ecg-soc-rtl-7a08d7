// Shared constants and types of the heartbeat detector and the ECG sensing
// domain. All time quantities are in samples of the 128 samples/s ECG stream.
// Window lengths follow the detector algorithm: a 1.5 s search/template window,
// an IHR search range of 0.27 s to 1.5 s, weight breakpoints at 0.54 s and
// 0.98 s, and a 0.1 s small window, each converted to samples at 128 samples/s
// (0.1 s rounds to 12 so that the template is symmetric around the QRS).
// The 10-bit sample-buffer address (1024 samples, 8 s) is this design's choice.
package hbd_pkg;

  localparam int unsigned FS_HZ     = 128;  // ECG sampling rate
  localparam int unsigned DW        = 8;    // sample width in bits
  localparam int unsigned LW        = 192;  // 1.5 s window
  localparam int unsigned TSH_MIN   = 35;   // 0.27 s
  localparam int unsigned TSH_MAX   = 192;  // 1.5 s
  localparam int unsigned W1_BRK1   = 69;   // 0.54 s
  localparam int unsigned W1_BRK2   = 125;  // 0.98 s
  localparam int unsigned LSW       = 12;   // 0.1 s small window
  localparam int unsigned ABW       = 10;   // sample buffer address bits
  localparam int unsigned TW        = 16;   // sample time counter width
  localparam int unsigned ACCW      = 32;   // accumulator width

  typedef logic signed [DW-1:0] sample_t;
  typedef logic [TW-1:0]        stime_t;
  typedef logic signed [ACCW-1:0] acc_t;

  // Detector states (coarse-fine template generation, then template matching)
  typedef enum logic [3:0] {
    S_FILL,      // collect enough samples for a coarse search
    S_COARSE,    // eq. (1)-(4): short-term autocorrelation over T_shift
    S_FINE,      // eq. (5)-(6): small-window search for the QRS time
    S_TM_WAIT,   // wait until the samples around t_QRS are in the buffer
    S_TM_INIT,   // eq. (7): copy the QRS into the template
    S_SLEEP,     // ADC off until the predicted search window opens
    S_WAIT_WIN,  // ADC on, wait until the predicted window is buffered
    S_MATCH,     // template matching inside the predicted window
    S_TM_UPD     // eq. (8): template update with the detected QRS
  } hbd_state_e;

  // Correlation-engine modes: one multiply-accumulate datapath is shared
  typedef enum logic [1:0] {M_COARSE, M_FINE, M_MATCH} corr_mode_e;

  // W1 of eq. (2), squared and scaled by 16: 1 -> 16, 0.75 -> 9, 0.5 -> 4
  function automatic logic [4:0] w1sq(input logic [8:0] tshift);
    if (tshift <= 9'(W1_BRK1))     return 5'd16;
    else if (tshift <= 9'(W1_BRK2)) return 5'd9;
    else                        return 5'd4;
  endfunction

  // W2 of eq. (3), scaled by 4: 1 -> 4, 0.75 -> 3, 0.5 -> 2
  function automatic logic [2:0] w2q(input logic [8:0] i);
    if (i <= 9'(LW/4)) return 3'd4;
    else if (i <= 9'(LW/2)) return 3'd3;
    else                return 3'd2;
  endfunction

endpackage
