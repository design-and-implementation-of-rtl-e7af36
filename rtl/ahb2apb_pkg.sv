// Shared types and constants of the AHB-to-APB bridge.
//
// ahb_state_t is the state set of the AHB-side controller (ahb_response):
// three APB "setup" states (ST_READ, ST_WRITE, ST_WRITEP) in which a transfer
// is handed to the APB clock domain, three "enable" states (ST_RENABLE,
// ST_WENABLE, ST_WENABLEP) in which its completion is answered on the AHB, the
// idle state and ST_WWAIT, the cycle that collects a write's data phase. The
// state names follow the bridge's published state diagram; the encoding is
// this design's choice.
//
// apb_state_t is the state set of the APB-side sequencer (apb_access); it is
// this design's own.
package ahb2apb_pkg;

  // AHB HTRANS encodings (AMBA 2.0)
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_READ     = 3'd1,
    ST_RENABLE  = 3'd2,
    ST_WWAIT    = 3'd3,
    ST_WRITE    = 3'd4,
    ST_WENABLE  = 3'd5,
    ST_WRITEP   = 3'd6,
    ST_WENABLEP = 3'd7
  } ahb_state_t;

  typedef enum logic [1:0] {
    P_IDLE   = 2'd0,
    P_SETUP  = 2'd1,
    P_ENABLE = 2'd2,
    P_DONE   = 2'd3
  } apb_state_t;

endpackage
