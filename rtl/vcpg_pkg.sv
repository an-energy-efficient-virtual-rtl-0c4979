// vcpg_pkg: types and constants shared by the power-gated virtual-channel
// mesh network.
//
// The defaults are those of the synthetic-traffic configuration: 4 VCs per
// input port, 4-flit VC buffers, 128-bit flits, 4-flit packets, XY routing,
// T_break-even = 15 cycles and T_wakeup = 4 cycles. The turn-on / turn-off
// ratio thresholds are powers of two and are stored as shift amounts: a warm
// router uses 8 (shift 3) and 32 (shift 5), a hot router doubles both and a
// cold router halves both. The flit header layout, the port numbering and the
// router-class encoding are this design's own choices.
package vcpg_pkg;

  // Port numbering of a router. The local port is injection/ejection.
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned P_NORTH = 0;  // towards y-1
  localparam int unsigned P_EAST  = 1;  // towards x+1
  localparam int unsigned P_SOUTH = 2;  // towards y+1
  localparam int unsigned P_WEST  = 3;  // towards x-1
  localparam int unsigned P_LOCAL = 4;

  localparam int unsigned NVC_DEF       = 4;    // VCs per input port
  localparam int unsigned VC_DEPTH_DEF  = 4;    // flits per VC
  localparam int unsigned FLIT_W_DEF    = 128;  // flit payload width
  localparam int unsigned T_BE_DEF      = 15;   // break-even time, cycles
  localparam int unsigned T_WAKE_DEF    = 4;    // wakeup latency, cycles
  localparam int unsigned MIN_EVAL_DEF  = 100;  // hold after a port change
  localparam int unsigned IDLE_LIM_DEF  = 1000; // no-request period for last VC
  localparam int unsigned CNT_W_DEF     = 10;   // win/lose counter width
  localparam int unsigned C1_LIM_DEF    = 31;   // counter1 limit (colder)
  localparam int unsigned C2_LIM_DEF    = 7;    // counter2 limit (hotter)

  // Warm thresholds as shifts: turn on below 2^3 = 8, turn off above 2^5 = 32.
  localparam int unsigned ON_SHIFT_WARM  = 3;
  localparam int unsigned OFF_SHIFT_WARM = 5;

  // Router class. Cold routers gate early, hot routers conservatively.
  typedef enum logic [1:0] {
    CLS_COLD = 2'd0,
    CLS_WARM = 2'd1,
    CLS_HOT  = 2'd2
  } rclass_e;

  // Power state of one virtual channel.
  typedef enum logic [1:0] {
    VCP_ON     = 2'd0,  // powered and usable
    VCP_OFF    = 2'd1,  // power-gated
    VCP_WAKING = 2'd2   // supply restored, waiting T_wakeup cycles
  } vcpwr_e;

  // Shift amounts of the turn-on and turn-off thresholds for a class.
  function automatic logic [2:0] on_shift(rclass_e c);
    case (c)
      CLS_COLD: on_shift = 3'(ON_SHIFT_WARM - 1);
      CLS_HOT:  on_shift = 3'(ON_SHIFT_WARM + 1);
      default:  on_shift = 3'(ON_SHIFT_WARM);
    endcase
  endfunction

  function automatic logic [2:0] off_shift(rclass_e c);
    case (c)
      CLS_COLD: off_shift = 3'(OFF_SHIFT_WARM - 1);
      CLS_HOT:  off_shift = 3'(OFF_SHIFT_WARM + 1);
      default:  off_shift = 3'(OFF_SHIFT_WARM);
    endcase
  endfunction

  // Initial class from the position in a k x k mesh. For k = 8 this gives
  // the map of a 2x2 cold block in each corner, a 4x4 hot centre and warm
  // routers elsewhere; other sizes scale the bands with k/4.
  function automatic rclass_e init_class(int x, int y, int k);
    int b;
    logic xin, yin, xout, yout;
    b    = (k >= 4) ? k / 4 : 1;
    xin  = (x >= b) && (x <= k - 1 - b);
    yin  = (y >= b) && (y <= k - 1 - b);
    xout = (x < b) || (x > k - 1 - b);
    yout = (y < b) || (y > k - 1 - b);
    if (xin && yin)        init_class = CLS_HOT;
    else if (xout && yout) init_class = CLS_COLD;
    else                   init_class = CLS_WARM;
  endfunction

endpackage
