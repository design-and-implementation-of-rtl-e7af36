// AHB response: the HCLK-domain controller of the AHB-to-APB bridge.
//
// It runs the bridge's eight-state machine. A transfer is "valid" when the
// bridge is selected (HSEL), the master signals NONSEQ or SEQ on HTRANS and the
// bus is ready (HREADYIN). A read goes straight to ST_READ; a write first spends
// one cycle in ST_WWAIT, where its data phase completes, and then goes to
// ST_WRITE, or to ST_WRITEP if a further transfer arrived meanwhile (a
// "pending" transfer, whose address the control transfer block holds). Writes
// are posted: the master sees no wait state for a write unless a further
// transfer is already waiting behind it.
//
// The APB side runs on its own clock, so each APB transfer is handed over with
// a four-phase handshake. In a setup state (ST_READ, ST_WRITE, ST_WRITEP) the
// block raises PENDRD or PENDWR once the synchronized PDONE is low, and keeps
// it up until the synchronized PDONE rises; it then drops the request and moves
// to the matching enable state (ST_RENABLE, ST_WENABLE, ST_WENABLEP). The
// next request is raised only after PDONE has fallen again. PENDWR and PENDRD
// come straight from flip-flops, as the synchronizer on the far side needs.
//
// The transitions out of each state are the published ones. Holding a setup
// state until PDONE arrives, and collecting a pending transfer while ST_WRITE
// waits, are this design's additions for the two clock domains; so are the
// HREADYOUT values (low in ST_READ and ST_WRITEP, low in ST_WENABLEP when the
// pending transfer is a read, low in ST_WRITE once a pending transfer is held,
// high elsewhere).
//
// Control outputs to ctrl_transfer (all acted on at the next HCLK edge):
//   cap_addr   - latch HADDR/HWRITE of the address phase now on the bus
//   load_h     - load the APB holding address (from the bus if h_src_bus,
//                else from the latched address)
//   load_wdata - capture HWDATA into the APB holding data register
//   load_rdata - capture the APB read data for HRDATA
module ahb_response
  import ahb2apb_pkg::*;
(
  input  logic       hclk,
  input  logic       hresetn,
  // AHB
  input  logic       hsel,
  input  logic [1:0] htrans,
  input  logic       hwrite,
  input  logic       hreadyin,
  output logic       hreadyout,
  // direction of the latched (pending) transfer, from ctrl_transfer
  input  logic       hwrite_reg,
  // handshake with the APB domain
  output logic       pendwr,
  output logic       pendrd,
  input  logic       pdone_sync,
  // control of ctrl_transfer
  output logic       cap_addr,
  output logic       load_h,
  output logic       h_src_bus,
  output logic       load_wdata,
  output logic       load_rdata,
  // observation
  output ahb_state_t state
);

  ahb_state_t state_nx;
  logic       valid;
  logic       pend_held;     // ST_WRITE has collected a pending transfer
  logic       pend_q;        // pendwr | pendrd
  logic       raise_req;     // raise PENDWR/PENDRD this cycle
  logic       apb_done;      // APB transfer of the current setup state finished
  logic       in_setup;

  assign valid     = hsel && hreadyin && (htrans == HTRANS_NONSEQ || htrans == HTRANS_SEQ);
  assign pend_q    = pendwr || pendrd;
  assign in_setup  = (state == ST_READ) || (state == ST_WRITE) || (state == ST_WRITEP);
  assign raise_req = in_setup && !pend_q && !pdone_sync;
  assign apb_done  = in_setup && pend_q && pdone_sync;

  always_comb begin
    unique case (state)
      ST_IDLE, ST_RENABLE, ST_WENABLE, ST_WWAIT: hreadyout = 1'b1;
      ST_WRITE:                                  hreadyout = !pend_held;
      ST_WENABLEP:                               hreadyout = hwrite_reg;
      default:                                   hreadyout = 1'b0;   // ST_READ, ST_WRITEP
    endcase
  end

  always_comb begin
    state_nx   = state;
    cap_addr   = 1'b0;
    load_h     = 1'b0;
    h_src_bus  = 1'b0;
    load_wdata = 1'b0;
    load_rdata = 1'b0;
    unique case (state)
      ST_IDLE, ST_RENABLE, ST_WENABLE: begin
        if (valid) begin
          cap_addr = 1'b1;
          if (hwrite) begin
            state_nx = ST_WWAIT;
          end else begin
            state_nx  = ST_READ;
            load_h    = 1'b1;
            h_src_bus = 1'b1;
          end
        end else begin
          state_nx = ST_IDLE;
        end
      end
      ST_WWAIT: begin
        load_h     = 1'b1;
        load_wdata = 1'b1;
        cap_addr   = valid;
        state_nx   = valid ? ST_WRITEP : ST_WRITE;
      end
      ST_READ: begin
        if (apb_done) begin
          load_rdata = 1'b1;
          state_nx   = ST_RENABLE;
        end
      end
      ST_WRITE: begin
        cap_addr = valid;
        if (apb_done) state_nx = (pend_held || valid) ? ST_WENABLEP : ST_WENABLE;
      end
      ST_WRITEP: begin
        if (apb_done) state_nx = ST_WENABLEP;
      end
      ST_WENABLEP: begin
        load_h = 1'b1;
        if (hwrite_reg) begin
          load_wdata = 1'b1;
          cap_addr   = valid;
          state_nx   = valid ? ST_WRITEP : ST_WRITE;
        end else begin
          state_nx = ST_READ;
        end
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state     <= ST_IDLE;
      pend_held <= 1'b0;
      pendwr    <= 1'b0;
      pendrd    <= 1'b0;
    end else begin
      state     <= state_nx;
      pend_held <= (state == ST_WRITE) && (state_nx == ST_WRITE) && (pend_held || valid);
      if (raise_req) begin
        pendrd <= (state == ST_READ);
        pendwr <= (state != ST_READ);
      end else if (apb_done) begin
        pendrd <= 1'b0;
        pendwr <= 1'b0;
      end
    end
  end

  // Handshake rules: never both requests, and a request only in a setup state.
  a_one_request: assert property (@(posedge hclk) disable iff (!hresetn) !(pendwr && pendrd));
  a_req_in_setup: assert property (@(posedge hclk) disable iff (!hresetn) pend_q |-> in_setup);

endmodule
