// ahb_response: AHB data-phase controller of the bridge (HCLK domain).
//
// It owns the bridge's single transfer buffer (hwaddr2, hwdata2, hwrite2,
// hsel2), which holds one AHB transfer while the APB side performs it. When
// a selected transfer is in its data phase (valid1 from the slave interface)
// and the buffer is free, the controller loads the buffer and raises PENDWR
// for a write or PENDRD for a read. The request is a four-phase handshake
// with the APB access block: the request stays high until PDONE (already
// synchronised into HCLK) arrives, then drops, and the buffer is free again
// once PDONE has gone low.
//
// Writes are posted: a write data phase ends in the same cycle the buffer is
// loaded, so a write to an idle bridge has no wait states. A write arriving
// while the buffer is still busy is stretched with HREADYOUT low until the
// buffer frees. A read data phase is stretched until the APB read data has
// come back; HRDATA is a register loaded from the APB side's captured PRDATA
// when PDONE is seen, and HREADYOUT goes high in the following cycle.
// HRESP is always OKAY: the APB side of the bridge has no error input.
//
// The block's name and the PENDWR/PENDRD/PDONE/HREADY signals follow the
// bridge's internal architecture; the single posted-write buffer, the
// four-phase handshake and the always-OKAY response are this design's
// own choices.
//
// Interface: prdata must be stable whenever pdone_h is high (the APB side
// holds it from PDONE until the next request).
module ahb_response
  import ahb2apb_pkg::*;
#(
  parameter int unsigned NUM_PSEL = 4
) (
  input  logic                HCLK,
  input  logic                HRESETn,
  // registered address phase from the slave interface
  input  logic                valid1,
  input  logic [ADDR_W-1:0]   hwaddr1,
  input  logic                hwritereg,
  input  logic [NUM_PSEL-1:0] hsel1,
  input  logic [DATA_W-1:0]   HWDATA,
  // AHB response
  output logic                HREADYOUT,
  output hresp_e              HRESP,
  output logic [DATA_W-1:0]   HRDATA,
  // request to the APB side, with the transfer buffer
  output logic                pendwr,
  output logic                pendrd,
  output logic [ADDR_W-1:0]   hwaddr2,
  output logic [DATA_W-1:0]   hwdata2,
  output logic                hwrite2,
  output logic [NUM_PSEL-1:0] hsel2,
  // completion from the APB side
  input  logic                pdone_h,
  input  logic [DATA_W-1:0]   prdata
);

  rsp_state_e state;
  logic       rd_issued;  // the read in its data phase has been handed on
  logic       rd_done;    // its data is in HRDATA
  logic       buf_free;
  logic       rd_complete;

  assign buf_free = (state == RSP_IDLE);
  assign HRESP    = HRESP_OKAY;

  always_comb begin
    if (!valid1)        HREADYOUT = 1'b1;
    else if (hwritereg) HREADYOUT = buf_free;
    else                HREADYOUT = rd_done;
  end

  assign rd_complete = valid1 && !hwritereg && rd_done;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state     <= RSP_IDLE;
      pendwr    <= 1'b0;
      pendrd    <= 1'b0;
      rd_issued <= 1'b0;
      rd_done   <= 1'b0;
      hwaddr2   <= '0;
      hwdata2   <= '0;
      hwrite2   <= 1'b0;
      hsel2     <= '0;
      HRDATA    <= '0;
    end else begin
      unique case (state)
        RSP_IDLE: begin
          if (valid1 && (hwritereg || !rd_issued)) begin
            hwaddr2 <= hwaddr1;
            hwrite2 <= hwritereg;
            hsel2   <= hsel1;
            if (hwritereg) begin
              hwdata2 <= HWDATA;
              pendwr  <= 1'b1;
            end else begin
              pendrd    <= 1'b1;
              rd_issued <= 1'b1;
            end
            state <= RSP_PEND;
          end
        end
        RSP_PEND: begin
          if (pdone_h) begin
            if (pendrd) begin
              HRDATA  <= prdata;
              rd_done <= 1'b1;
            end
            pendwr <= 1'b0;
            pendrd <= 1'b0;
            state  <= RSP_RETIRE;
          end
        end
        RSP_RETIRE: begin
          if (!pdone_h) state <= RSP_IDLE;
        end
        default: state <= RSP_IDLE;
      endcase
      if (rd_complete) begin
        rd_issued <= 1'b0;
        rd_done   <= 1'b0;
      end
    end
  end

  // Only one kind of request is ever outstanding.
  a_one_request: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !(pendwr && pendrd));
  // The buffer does not change while a request is outstanding.
  a_buffer_stable: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (pendwr || pendrd) |=> ((pendwr || pendrd) ? $stable(hwaddr2) && $stable(hwdata2) : 1'b1));
  // Outside a data phase of this slave the bridge reports ready.
  a_ready_idle: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !valid1 |-> HREADYOUT);

endmodule
