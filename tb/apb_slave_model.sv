// apb_slave_model: behavioural model of the APB peripherals behind the
// bridge, for simulation only (not synthesizable).
//
// NUM_PSEL peripherals share one sparse word memory. A location that was
// never written reads as init_word(address) = {addr[15:0] ^ 16'h5A5A,
// addr[31:16]}. Each transfer gets a random number of wait states between 0
// and max_wait: PREADY is held low for that many ACCESS cycles. Outside a
// ready ACCESS cycle PRDATA carries 32'hDEAD_BEEF, so a bridge that samples
// at the wrong time reads a wrong value. `xfer` is high in the cycle an APB
// transfer completes, with xfer_sel the index of the selected peripheral.
module apb_slave_model #(
  parameter int unsigned NUM_PSEL = 4
) (
  input  logic                PCLK,
  input  logic                PRESETn,
  input  logic [NUM_PSEL-1:0] PSEL,
  input  logic                PENABLE,
  input  logic [31:0]         PADDR,
  input  logic                PWRITE,
  input  logic [31:0]         PWDATA,
  output logic [31:0]         PRDATA,
  output logic                PREADY,
  input  int unsigned         max_wait,
  output logic                xfer,
  output int                  xfer_sel,
  output int unsigned         wait_cycles
);

  logic [31:0] mem [logic [31:0]];
  int unsigned waits_left;
  logic        selected;

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0] ^ 16'h5A5A, a[31:16]};
  endfunction

  assign selected = (PSEL != '0);
  assign PREADY   = selected && PENABLE && (waits_left == 0);
  assign xfer     = PREADY;

  always_comb begin
    xfer_sel = -1;
    for (int i = 0; i < int'(NUM_PSEL); i++) if (PSEL[i]) xfer_sel = i;
  end

  always_comb begin
    if (PREADY && !PWRITE) PRDATA = mem.exists(PADDR) ? mem[PADDR] : init_word(PADDR);
    else                   PRDATA = 32'hDEAD_BEEF;
  end

  always @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      waits_left  <= 0;
      wait_cycles <= 0;
    end else begin
      if (selected && !PENABLE)
        waits_left <= (max_wait == 0) ? 0 : $urandom_range(max_wait, 0);
      else if (selected && PENABLE && waits_left != 0) begin
        waits_left  <= waits_left - 1;
        wait_cycles <= wait_cycles + 1;
      end
      if (PREADY && PWRITE) mem[PADDR] = PWDATA;
    end
  end

endmodule
