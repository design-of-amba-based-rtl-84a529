// tb_ahb2apb_operations: the bridge's five basic operations on a single
// clock, with exact cycle counts.
//
// HCLK and PCLK are the same signal and the APB peripheral model inserts no
// wait states. The operations are: single write, single read, four-beat
// burst write, four-beat burst read (INCR4) and a write followed back to
// back by a read. For each AHB data phase the number of wait states
// (HREADYOUT low) is compared with the value worked out from the
// handshake:
//   write, bridge idle                          0
//   read,  bridge idle                          9  = issue + 2 sync + SETUP
//                                                  + ACCESS + PDONE + 2 sync
//                                                  + HRDATA load
//   any transfer right behind a posted write   14  until that write's
//                                                  handshake has closed
//                                                  (5 to PDONE, 3 to drop
//                                                  the request, 3 to drop
//                                                  PDONE, 3 to see it low)
//   read right behind a posted write           23  = 14 + 9
//   burst read beat behind a read              14  (handshake close 5 +
//                                                  issue-to-data 9)
// Read data and the APB transfers are checked as well.
module tb_ahb2apb_operations;
  import ahb2apb_pkg::*;

  localparam int unsigned NP = 4;

  logic CLK = 0, RESETn = 0;
  logic        HSEL, HWRITE, HREADYOUT, PENABLE, PWRITE, PREADY;
  logic [1:0]  HTRANS, HRESP;
  logic [31:0] HADDR, HWDATA, HRDATA, PADDR, PWDATA, PRDATA;
  logic [NP-1:0] PSEL;
  int unsigned max_wait = 0;
  logic        xfer;
  int          xfer_sel;
  int unsigned wait_cycles;

  always #5 CLK = ~CLK;

  ahb2apb_bridge dut (
    .HCLK(CLK), .HRESETn(RESETn), .HSEL, .HADDR, .HTRANS, .HWRITE, .HWDATA,
    .HREADYIN(HREADYOUT), .HREADYOUT, .HRESP, .HRDATA,
    .PCLK(CLK), .PRESETn(RESETn), .PSEL, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY
  );

  apb_slave_model #(.NUM_PSEL(NP)) u_apb (
    .PCLK(CLK), .PRESETn(RESETn), .PSEL, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY,
    .max_wait, .xfer, .xfer_sel, .wait_cycles
  );

  int checks = 0, failures = 0, n_apb = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0] ^ 16'h5A5A, a[31:16]};
  endfunction

  always @(posedge CLK) if (RESETn && xfer) n_apb++;

  typedef struct {
    bit          write;
    logic [31:0] addr;
    logic [31:0] data;
    int          exp_waits;
    logic [31:0] exp_rdata;
  } beat_t;

  // Run a sequence of beats as one pipelined AHB burst (first NONSEQ, the
  // rest SEQ) or as separate NONSEQ transfers, then return to IDLE.
  task automatic run(string name, beat_t b[], bit burst);
    int waits;
    int apb0 = n_apb;
    @(negedge CLK);
    for (int i = 0; i <= b.size(); i++) begin
      // address phase of beat i (or IDLE), data phase of beat i-1
      if (i < b.size()) begin
        HSEL = 1; HTRANS = (burst && i > 0) ? 2'b11 : 2'b10;
        HADDR = b[i].addr; HWRITE = b[i].write;
      end else begin
        HSEL = 0; HTRANS = 2'b00; HADDR = 0; HWRITE = 0;
      end
      if (i > 0) HWDATA = b[i-1].data;
      waits = 0;
      #1;
      while (!HREADYOUT && waits < 100) begin
        @(negedge CLK); #1;
        waits++;
      end
      if (i > 0) begin
        check(waits == b[i-1].exp_waits, $sformatf("%s beat %0d: %0d wait states, expected %0d",
                                                   name, i - 1, waits, b[i-1].exp_waits));
        check(HRESP == 2'b00, $sformatf("%s beat %0d: HRESP not OKAY", name, i - 1));
        if (!b[i-1].write)
          check(HRDATA == b[i-1].exp_rdata, $sformatf("%s beat %0d: HRDATA %h expected %h",
                                                      name, i - 1, HRDATA, b[i-1].exp_rdata));
      end
      @(negedge CLK);
    end
    // let the last posted write finish on the APB
    repeat (20) @(negedge CLK);
    check(n_apb - apb0 == b.size(), $sformatf("%s: %0d APB transfers, expected %0d",
                                              name, n_apb - apb0, b.size()));
    $display("  %s done", name);
  endtask

  initial begin
    beat_t b1[], b4[];
    HSEL = 0; HTRANS = 0; HADDR = 0; HWRITE = 0; HWDATA = 0;
    repeat (3) @(posedge CLK);
    RESETn = 1;
    // single write, then single read of the same word
    b1 = new[1];
    b1[0] = '{1, 32'h8000_0032, 32'h0000_0024, 0, 0};
    run("single write", b1, 0);
    b1[0] = '{0, 32'h8000_0032, 0, 9, 32'h0000_0024};
    run("single read", b1, 0);
    // burst write of four beats at consecutive addresses
    b4 = new[4];
    for (int i = 0; i < 4; i++) b4[i] = '{1, 32'h8000_0000 + i, 32'h0000_0024 + i, i == 0 ? 0 : 14, 0};
    run("burst write", b4, 1);
    // burst read of the same four words
    for (int i = 0; i < 4; i++) b4[i] = '{0, 32'h8000_0000 + i, 0, i == 0 ? 9 : 14, 32'h0000_0024 + i};
    run("burst read", b4, 1);
    // back to back: write then read without an idle cycle
    b1 = new[2];
    b1[0] = '{1, 32'h8100_0010, 32'hCAFE_0001, 0, 0};
    b1[1] = '{0, 32'h8100_0010, 0, 23, 32'hCAFE_0001};
    run("back to back", b1, 0);
    // a read of a location never written returns the peripheral's pattern
    b1 = new[1];
    b1[0] = '{0, 32'h8300_0400, 0, 9, init_word(32'h8300_0400)};
    run("read of unwritten word", b1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
