// ahb_slave_if: AHB slave interface of the bridge, address decoder and
// address-phase pipeline register (HCLK domain).
//
// The decoder looks at the AHB address phase and raises `valid` when the
// bridge is selected (HSEL), the bus is ready (HREADYIN) and the transfer is
// NONSEQ or SEQ to an address inside the APB window. The window starts at
// BASE_ADDR and holds NUM_PSEL slots of 2**SLOT_BITS bytes, one per APB
// peripheral; the slot number becomes the one-hot peripheral select.
//
// Whenever HREADYIN is high the AHB address phase ends, so the register
// stage (hwaddr1, hwritereg, hsel1, valid1) loads the decoded address phase;
// while HREADYIN is low it holds. The registered values are therefore the
// address-phase information of the transfer that is in its data phase.
//
// The split into a decoder and a pipeline register, and the names VALID,
// HWADDR1, HWRITEREG and PSELx, follow the bridge's block diagram. The
// address map (BASE_ADDR, SLOT_BITS, NUM_PSEL) is this design's own choice;
// BASE_ADDR matches the 0x8000_0000 addresses used in the bridge's
// simulations.
//
// Timing: `valid` and `tempsel` are combinational on the address phase;
// the registered outputs change one HCLK edge after the address phase.
module ahb_slave_if
  import ahb2apb_pkg::*;
#(
  parameter int unsigned          NUM_PSEL  = 4,
  parameter logic [ADDR_W-1:0]    BASE_ADDR = 32'h8000_0000,
  parameter int unsigned          SLOT_BITS = 24
) (
  input  logic                HCLK,
  input  logic                HRESETn,
  input  logic                HSEL,
  input  logic [ADDR_W-1:0]   HADDR,
  input  htrans_e             HTRANS,
  input  logic                HWRITE,
  input  logic                HREADYIN,
  // decoder outputs (address phase)
  output logic                valid,
  output logic [NUM_PSEL-1:0] tempsel,
  // registered address phase (data phase of the same transfer)
  output logic                valid1,
  output logic [ADDR_W-1:0]   hwaddr1,
  output logic                hwritereg,
  output logic [NUM_PSEL-1:0] hsel1
);

  localparam int unsigned IDX_W = (NUM_PSEL > 1) ? $clog2(NUM_PSEL) : 1;
  localparam int unsigned TOP_LSB = SLOT_BITS + IDX_W;

  logic             in_window;
  logic [IDX_W-1:0] slot;

  always_comb begin
    slot      = HADDR[SLOT_BITS +: IDX_W];
    in_window = (HADDR[ADDR_W-1:TOP_LSB] == BASE_ADDR[ADDR_W-1:TOP_LSB])
                && (int'(slot) < NUM_PSEL);
    tempsel   = '0;
    if (in_window) tempsel[slot] = 1'b1;
    valid     = HSEL && HREADYIN && HTRANS[1] && in_window;
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      valid1    <= 1'b0;
      hwaddr1   <= '0;
      hwritereg <= 1'b0;
      hsel1     <= '0;
    end else if (HREADYIN) begin
      valid1    <= valid;
      hwaddr1   <= HADDR;
      hwritereg <= HWRITE;
      hsel1     <= valid ? tempsel : '0;
    end
  end

endmodule
