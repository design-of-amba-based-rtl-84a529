// ahb2apb_bridge: AMBA AHB-to-APB bridge.
//
// The bridge is an AHB slave on the system bus and the only master of the
// APB peripheral bus. It latches the address, control and write data of an
// AHB transfer, performs the matching APB transfer to one of NUM_PSEL
// peripherals, and returns the read data and the response to the AHB.
// The AHB side runs on HCLK and the APB side on PCLK; the two clocks may
// have any ratio and phase.
//
// Structure (HCLK | PCLK):
//   ahb_slave_if     decodes the AHB address phase (VALID, PSELx) and
//                    registers it for the data phase (HWADDR1, HWRITEREG)
//   ahb_response     data-phase control: transfer buffer (HWADDR2, HWDATA2),
//                    PENDWR / PENDRD requests, HREADYOUT, HRESP, HRDATA
//   control_transfer synchronisers for PENDWR / PENDRD and PDONE
//   apb_access       APB setup/access state machine, PREADY wait states,
//                    PRDATA capture, PDONE
//
// Address map: peripheral i is selected by addresses
// BASE_ADDR + i*2**SLOT_BITS ... BASE_ADDR + (i+1)*2**SLOT_BITS - 1.
// Transfers outside that window, IDLE and BUSY transfers are ignored.
//
// Timing: writes are posted and complete on the AHB with no wait state when
// the buffer is free; a write that finds the buffer busy waits until the
// previous APB transfer's handshake has closed (14 wait states behind a
// posted write when HCLK and PCLK are one clock). A read holds HREADYOUT low
// until its APB read has finished and its data has crossed back: 9 wait
// states from an idle bridge on one clock with no APB wait states, 8 when
// the PCLK edge falls shortly after the HCLK edge. Each APB wait state adds
// one PCLK cycle. HRESP is always OKAY.
//
// The blocks and their signals follow the bridge's block diagrams; the
// address map, the single posted-write buffer, the PREADY input and the
// handshake are this design's choices.
module ahb2apb_bridge
  import ahb2apb_pkg::*;
#(
  parameter int unsigned       NUM_PSEL    = 4,
  parameter logic [ADDR_W-1:0] BASE_ADDR   = 32'h8000_0000,
  parameter int unsigned       SLOT_BITS   = 24,
  parameter int unsigned       SYNC_STAGES = 2
) (
  // AHB slave port (HCLK domain)
  input  logic                HCLK,
  input  logic                HRESETn,
  input  logic                HSEL,
  input  logic [ADDR_W-1:0]   HADDR,
  input  logic [1:0]          HTRANS,
  input  logic                HWRITE,
  input  logic [DATA_W-1:0]   HWDATA,
  input  logic                HREADYIN,
  output logic                HREADYOUT,
  output logic [1:0]          HRESP,
  output logic [DATA_W-1:0]   HRDATA,
  // APB master port (PCLK domain)
  input  logic                PCLK,
  input  logic                PRESETn,
  output logic [NUM_PSEL-1:0] PSEL,
  output logic                PENABLE,
  output logic [ADDR_W-1:0]   PADDR,
  output logic                PWRITE,
  output logic [DATA_W-1:0]   PWDATA,
  input  logic [DATA_W-1:0]   PRDATA,
  input  logic                PREADY
);

  logic                valid, valid1, hwritereg, hwrite2;
  logic [NUM_PSEL-1:0] tempsel, hsel1, hsel2;
  logic [ADDR_W-1:0]   hwaddr1, hwaddr2;
  logic [DATA_W-1:0]   hwdata2, prdata_q;
  logic                pendwr, pendrd, pendwr_p, pendrd_p, pdone, pdone_h;
  hresp_e              hresp;

  ahb_slave_if #(
    .NUM_PSEL (NUM_PSEL),
    .BASE_ADDR(BASE_ADDR),
    .SLOT_BITS(SLOT_BITS)
  ) u_slave_if (
    .HCLK, .HRESETn, .HSEL, .HADDR,
    .HTRANS   (htrans_e'(HTRANS)),
    .HWRITE, .HREADYIN,
    .valid, .tempsel, .valid1, .hwaddr1, .hwritereg, .hsel1
  );

  ahb_response #(.NUM_PSEL(NUM_PSEL)) u_response (
    .HCLK, .HRESETn,
    .valid1, .hwaddr1, .hwritereg, .hsel1, .HWDATA,
    .HREADYOUT,
    .HRESP    (hresp),
    .HRDATA,
    .pendwr, .pendrd, .hwaddr2, .hwdata2, .hwrite2, .hsel2,
    .pdone_h,
    .prdata   (prdata_q)
  );

  assign HRESP = hresp;

  // A valid address phase selects exactly one peripheral.
  a_valid_selects_one: assert property (@(posedge HCLK) disable iff (!HRESETn)
    valid |-> $onehot(tempsel));

  control_transfer #(.SYNC_STAGES(SYNC_STAGES)) u_control (
    .HCLK, .HRESETn, .PCLK, .PRESETn,
    .pendwr, .pendrd, .pdone_h,
    .pendwr_p, .pendrd_p, .pdone
  );

  apb_access #(.NUM_PSEL(NUM_PSEL)) u_apb (
    .PCLK, .PRESETn,
    .pendwr_p, .pendrd_p, .hwaddr2, .hwdata2, .hwrite2, .hsel2,
    .pdone, .prdata_q,
    .PSEL, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY
  );

endmodule
