// frp_pkg: the Flow Rate Packet (FRP) fields that every block of the
// max-min-fair rate regulation scheme reads or writes.
//
// An FRP carries four flag bits and two rates. The flags and the two rates
// (Current Rate CR and Desired Rate DR) follow the scheme's packet layout;
// rates are unsigned integers in units of a fraction of the maximum link
// bandwidth. The packed layout, least significant bit first, is
//   [0] stop  flow-stop message
//   [1] init  flow-init message
//   [2] frp   the fields hold an FRP
//   [3] fw    forward: the FRP has not reached its destination yet
//   [RATE_W+3:4]          CR
//   [2*RATE_W+3:RATE_W+4] DR
// so with 8-bit rates a whole FRP is 20 bits and a normal forward FRP has
// flags 4'b1100. The 8-bit rate width is the scheme's own choice; the bit
// order of the flags is this implementation's.
package frp_pkg;

  localparam int unsigned RATE_W = 8;

  typedef logic [RATE_W-1:0] rate_t;

  typedef struct packed {
    rate_t dr;
    rate_t cr;
    logic  fw;
    logic  frp;
    logic  init;
    logic  stop;
  } frp_t;

  localparam int unsigned FRP_W = $bits(frp_t);

  // Message classes a contention point distinguishes.
  typedef enum logic [2:0] {
    MSG_OTHER,    // payload or backward FRP: passed through untouched
    MSG_STOP,     // flow-stop FRP
    MSG_INIT,     // forward flow-init FRP
    MSG_NORMAL    // forward FRP that is neither init nor stop
  } msg_kind_e;

  function automatic msg_kind_e classify(frp_t p);
    if (p.frp && p.stop)               return MSG_STOP;
    else if (p.frp && p.fw && p.init)  return MSG_INIT;
    else if (p.frp && p.fw)            return MSG_NORMAL;
    else                               return MSG_OTHER;
  endfunction

  function automatic rate_t rate_min(rate_t a, rate_t b);
    return (a < b) ? a : b;
  endfunction

endpackage
