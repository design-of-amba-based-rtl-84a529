// apb_access: APB master state machine of the bridge (PCLK domain).
//
// For each request from the AHB side (pendwr_p or pendrd_p, already
// synchronised into PCLK) it runs one APB transfer from the transfer buffer:
//   SETUP  : PSEL of the addressed peripheral high, PENABLE low, PADDR,
//            PWRITE and PWDATA valid;
//   ACCESS : PENABLE high; stays here while the peripheral holds PREADY low
//            (wait states); on PREADY high a read captures PRDATA;
//   DONE   : PSEL and PENABLE low, PDONE high until the request drops,
//            which completes the four-phase handshake.
// A transfer therefore takes two PCLK cycles on the APB plus one per wait
// state. PADDR, PWRITE and PWDATA are registered and keep their last value
// between transfers. The captured read data (prdata_q) stays stable from
// PDONE until the next request, so the AHB side may sample it in HCLK.
//
// The APB FSM controller, its PSELx/PENABLE/PADDR/PWRITE/PWDATA/PRDATA
// signals and its support for peripherals that add wait states follow the
// bridge's description; the PREADY input that carries those wait states
// (as in APB3), the state encoding and the DONE state of the handshake are
// this design's choices.
module apb_access
  import ahb2apb_pkg::*;
#(
  parameter int unsigned NUM_PSEL = 4
) (
  input  logic                PCLK,
  input  logic                PRESETn,
  // request from the AHB side
  input  logic                pendwr_p,
  input  logic                pendrd_p,
  input  logic [ADDR_W-1:0]   hwaddr2,
  input  logic [DATA_W-1:0]   hwdata2,
  input  logic                hwrite2,
  input  logic [NUM_PSEL-1:0] hsel2,
  output logic                pdone,
  output logic [DATA_W-1:0]   prdata_q,
  // APB
  output logic [NUM_PSEL-1:0] PSEL,
  output logic                PENABLE,
  output logic [ADDR_W-1:0]   PADDR,
  output logic                PWRITE,
  output logic [DATA_W-1:0]   PWDATA,
  input  logic [DATA_W-1:0]   PRDATA,
  input  logic                PREADY
);

  apb_state_e state;
  logic       request;

  assign request = pendwr_p || pendrd_p;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      state    <= APB_IDLE;
      PSEL     <= '0;
      PENABLE  <= 1'b0;
      PADDR    <= '0;
      PWRITE   <= 1'b0;
      PWDATA   <= '0;
      pdone    <= 1'b0;
      prdata_q <= '0;
    end else begin
      unique case (state)
        APB_IDLE: begin
          if (request) begin
            PSEL   <= hsel2;
            PADDR  <= hwaddr2;
            PWRITE <= hwrite2;
            PWDATA <= hwdata2;
            state  <= APB_SETUP;
          end
        end
        APB_SETUP: begin
          PENABLE <= 1'b1;
          state   <= APB_ACCESS;
        end
        APB_ACCESS: begin
          if (PREADY) begin
            if (!PWRITE) prdata_q <= PRDATA;
            PSEL    <= '0;
            PENABLE <= 1'b0;
            pdone   <= 1'b1;
            state   <= APB_DONE;
          end
        end
        APB_DONE: begin
          if (!request) begin
            pdone <= 1'b0;
            state <= APB_IDLE;
          end
        end
        default: state <= APB_IDLE;
      endcase
    end
  end

  // APB protocol rules seen from the master.
  a_enable_needs_sel: assert property (@(posedge PCLK) disable iff (!PRESETn)
    PENABLE |-> (PSEL != '0));
  a_onehot_sel: assert property (@(posedge PCLK) disable iff (!PRESETn)
    $onehot0(PSEL));
  a_setup_then_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    ((PSEL != '0) && !PENABLE) |=> PENABLE);
  a_stable_in_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (PENABLE && !PREADY) |=> ($stable(PADDR) && $stable(PWRITE) && $stable(PWDATA)
                              && $stable(PSEL) && PENABLE));
  a_direction_matches: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (state == APB_IDLE && request) |-> (hwrite2 == pendwr_p));

endmodule
