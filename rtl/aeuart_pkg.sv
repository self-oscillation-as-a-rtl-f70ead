// aeuart_pkg - shared constants and register-content types of the
// asynchronous enhanced UART (aEUART).
//
// Every unit of the aEUART stores its whole state in one FSL register. The
// packed structs below give the logical content of those registers; other
// units read them (after phase alignment) as plain values. One firing of the
// whole register ring is one tick of the self-oscillation, the only time base
// of the design.
//
// A unit always takes a neighbour's whole state word: every rail of it goes
// into the unit's phase detection, which is what orders the firing. The
// unit's logic then uses only the fields it needs, so a lint run lists the
// remaining decoded fields as unused; that is expected.
//
// Register map of the memory-mapped interface (eight 16-bit registers), the
// status bit positions, the UART configuration fields and the command bits are
// this design's choices; the set of registers (status, config, message,
// EUBRS, timer, timestamp/timer-match, UART configuration, command) follows the
// description of the enhanced UART.
package aeuart_pkg;

  localparam int unsigned DATA_W    = 16;  // width of the memory-mapped registers
  localparam int unsigned FRAME_W   = 20;  // start + 16 data + parity + 2 stop
  localparam int unsigned CELL_W    = 12;  // sync cell length in ticks
  localparam int unsigned SYNC_CELLS = 8;  // equidistant cells of a sync pattern
  localparam int unsigned TOL_SHIFT  = 4;  // tolerance 1/16 = 6.25 %
  localparam int unsigned ACC_W     = 17;  // baud accumulator width
  // Every tick adds 2*16 to the baud accumulator: t_bit = EUBRS/16 * 1/2 ticks.
  localparam logic [ACC_W-1:0] ACC_STEP = 17'd32;

  // Register addresses
  typedef enum logic [2:0] {
    A_STATUS = 3'd0,
    A_CONFIG = 3'd1,
    A_MSG    = 3'd2,
    A_EUBRS  = 3'd3,
    A_TIMER  = 3'd4,
    A_TSTM   = 3'd5,
    A_UCFG   = 3'd6,
    A_CMD    = 3'd7
  } addr_e;

  // Status register bits
  localparam int unsigned S_RXFULL = 0;
  localparam int unsigned S_PERR   = 1;
  localparam int unsigned S_FERR   = 2;
  localparam int unsigned S_OVR    = 3;
  localparam int unsigned S_TXBUSY = 4;
  localparam int unsigned S_COLL   = 5;
  localparam int unsigned S_READY  = 6;
  localparam int unsigned S_TXPEND = 7;

  // Command register bits
  localparam int unsigned C_TXMATCH = 0;  // transmission waits for timer match
  localparam int unsigned C_RESYNC  = 1;  // back to the SYNC state (self-clearing)

  typedef enum logic {ST_SYNC = 1'b0, ST_READY = 1'b1} ctrl_state_e;

  // UART configuration register
  typedef struct packed {
    logic [7:0] unused;
    logic       two_stop;  // [7]
    logic [1:0] parity;    // [6:5] 0 none, 1 even, 2 odd
    logic [4:0] len;       // [4:0] data bits, 1..16
  } ucfg_t;

  localparam ucfg_t UCFG_RESET = '{unused: '0, two_stop: 1'b0, parity: 2'd0, len: 5'd8};

  // Host request as presented by the wrapper
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [2:0]        addr;
    logic [DATA_W-1:0] wdata;
  } req_t;

  // ---- register contents of the units ----

  typedef struct packed {
    logic               txd;     // serial output level
    logic               busy;
    logic               done;    // one-tick pulse after the last stop bit
    logic [4:0]         nbits;   // bits still to send
    logic [FRAME_W-1:0] shreg;   // LSB is sent next
  } tx_t;

  typedef struct packed {
    logic [DATA_W-1:0] timer;
    logic              match;   // one-tick pulse: timer equals match value
  } tim_t;

  typedef struct packed {
    logic coll;       // sticky: bus level differed from transmitted bit
    logic chk;        // one-tick pulse: a bit was compared
  } err_t;

  typedef struct packed {
    logic              busy;
    logic [4:0]        bitidx;  // 0 start bit, 1..len data, then parity, stop
    logic [1:0]        smp;     // first two oversamples of the current bit
    logic [17:0]       shreg;   // received data and parity, LSB first
    logic              bus_prev;
    logic              en_prev; // receiver was enabled in the previous tick
    logic              start;   // one-tick pulse: start edge seen
    logic              done;    // one-tick pulse: frame complete
    logic [DATA_W-1:0] data;
    logic              perr;
    logic              ferr;
  } rx_t;

  typedef struct packed {
    logic [DATA_W-1:0] eubrs;      // 12.4 fixed point, 2x ticks per bit
    logic              sync_done;  // one-tick pulse: sync pattern accepted
    logic              meas;       // measuring a sync pattern
    logic [3:0]        ncells;
    logic [CELL_W-1:0] cnt;
    logic [CELL_W-1:0] prev;
    logic [CELL_W+2:0] total;
    logic              bus_prev;
    logic [ACC_W-1:0]  tacc;       // free-running bit channel
    logic              bit_tick;   // one-tick pulse per bit time
    logic              tx_mid;     // one-tick pulse in the middle of a bit time
    logic [ACC_W-1:0]  racc;       // receive channel, restarted at start edges
    logic [2:0]        rx_smp;     // one-hot oversampling pulses (7/16, 8/16, 9/16)
  } ebr_t;

  typedef struct packed {
    ctrl_state_e       state;
    logic [DATA_W-1:0] config_r;
    logic [DATA_W-1:0] ucfg;
    logic [DATA_W-1:0] cmd;
    logic [DATA_W-1:0] msg;      // last received message
    logic [DATA_W-1:0] tx_data;  // message to transmit
    logic [DATA_W-1:0] tm_val;   // timer match value
    logic [DATA_W-1:0] ts;       // time stamp of the last start edge
    logic              rx_full;
    logic              perr;
    logic              ferr;
    logic              ovr;
    logic              tx_req;   // transmission waiting for an idle transmitter
    logic              tx_wait;  // transmission waiting for a timer match
    logic              tm_armed;
    logic              go;        // one-tick pulse: transmitter starts
    logic              timer_wr;  // one-tick pulse: load timer with wval
    logic              eubrs_wr;  // one-tick pulse: load EUBRS with wval
    logic              clr_err;   // one-tick pulse: clear error-unit flags
    logic [DATA_W-1:0] wval;
    logic [DATA_W-1:0] rdata;     // answer to the request just consumed
  } ctrl_t;

  localparam int unsigned TX_W   = $bits(tx_t);
  localparam int unsigned TIM_W  = $bits(tim_t);
  localparam int unsigned ERR_W  = $bits(err_t);
  localparam int unsigned RX_W   = $bits(rx_t);
  localparam int unsigned EBR_W  = $bits(ebr_t);
  localparam int unsigned CTRL_W = $bits(ctrl_t);
  localparam int unsigned REQ_W  = $bits(req_t);

  // Majority of three samples
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (b & c) | (a & c);
  endfunction

endpackage
