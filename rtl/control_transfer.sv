// control_transfer: clock-domain crossing between the bridge's AHB side
// (HCLK) and its APB side (PCLK).
//
// The bridge is meant to work for any ratio and phase of HCLK and PCLK, so
// the only signals that cross are single-bit levels of a four-phase
// handshake, each through a chain of SYNC_STAGES flip-flops clocked by the
// receiving clock:
//   PENDWR, PENDRD (HCLK -> PCLK)   pending write / pending read request
//   PDONE          (PCLK -> HCLK)   the APB transfer has finished
// The multi-bit transfer buffer (address, write data, direction, select) and
// the captured read data are not synchronised: the handshake guarantees
// that each is stable for the whole time the receiving side looks at it.
//
// The block's place between the AHB response and the APB access blocks, and
// the PENDWR/PENDRD/PDONE names, follow the bridge's internal architecture;
// the synchroniser depth is this design's choice. Each direction adds
// SYNC_STAGES receiving-clock cycles of latency.
module control_transfer #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic HCLK,
  input  logic HRESETn,
  input  logic PCLK,
  input  logic PRESETn,
  // HCLK domain
  input  logic pendwr,
  input  logic pendrd,
  output logic pdone_h,
  // PCLK domain
  output logic pendwr_p,
  output logic pendrd_p,
  input  logic pdone
);

  logic [SYNC_STAGES-1:0] wr_sync, rd_sync, done_sync;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      wr_sync <= '0;
      rd_sync <= '0;
    end else begin
      wr_sync <= {wr_sync[SYNC_STAGES-2:0], pendwr};
      rd_sync <= {rd_sync[SYNC_STAGES-2:0], pendrd};
    end
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) done_sync <= '0;
    else          done_sync <= {done_sync[SYNC_STAGES-2:0], pdone};
  end

  assign pendwr_p = wr_sync[SYNC_STAGES-1];
  assign pendrd_p = rd_sync[SYNC_STAGES-1];
  assign pdone_h  = done_sync[SYNC_STAGES-1];

  initial assert (SYNC_STAGES >= 2) else $error("SYNC_STAGES must be at least 2");

endmodule
