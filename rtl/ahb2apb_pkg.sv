// ahb2apb_pkg: types and constants shared by the AHB-to-APB bridge.
//
// Holds the AHB transfer-type encoding (HTRANS), the AHB response encoding
// (HRESP), the state encodings of the two controllers, and the bus widths.
// The 32-bit address and data widths follow the bridge's AHB port widths;
// the encodings are the ones the AMBA AHB and APB protocols define.
package ahb2apb_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  // AHB HTRANS encoding.
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // AHB HRESP encoding (two-bit form).
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Data-phase state of the AHB response controller (HCLK domain).
  typedef enum logic [1:0] {
    RSP_IDLE   = 2'b00,  // buffer free, no request outstanding
    RSP_PEND   = 2'b01,  // PENDWR or PENDRD raised, waiting for PDONE
    RSP_RETIRE = 2'b10   // PDONE seen, request dropped, waiting for PDONE low
  } rsp_state_e;

  // APB access state machine (PCLK domain).
  typedef enum logic [1:0] {
    APB_IDLE   = 2'b00,  // PSEL low
    APB_SETUP  = 2'b01,  // PSEL high, PENABLE low
    APB_ACCESS = 2'b10,  // PSEL high, PENABLE high, waiting for PREADY
    APB_DONE   = 2'b11   // PDONE high, waiting for the request to drop
  } apb_state_e;

endpackage
