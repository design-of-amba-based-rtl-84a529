// tb_apb_access: self-checking test of the bridge's APB state machine.
//
// A request (pendwr_p or pendrd_p with a transfer buffer) is applied and
// the APB side is checked edge by edge against the APB protocol: a SETUP
// cycle with the right PSEL, PADDR, PWRITE and PWDATA and PENABLE low, then
// ACCESS cycles with PENABLE high until the peripheral model gives PREADY,
// then PDONE with PSEL low. The cycle count from the request to PDONE must
// be 3 + the number of wait states the model inserted. PDONE must stay high
// while the request is held and fall one edge after it drops. Reads must
// return the model's data in prdata_q; the expected data comes from a
// reference memory kept by the testbench.
module tb_apb_access;
  import ahb2apb_pkg::*;

  localparam int unsigned NP = 4;

  logic PCLK = 0, PRESETn = 0;
  logic pendwr_p, pendrd_p, hwrite2, pdone, PENABLE, PWRITE, PREADY;
  logic [31:0] hwaddr2, hwdata2, prdata_q, PADDR, PWDATA, PRDATA;
  logic [NP-1:0] hsel2, PSEL;
  int unsigned max_wait = 3;
  logic xfer;
  int   xfer_sel;
  int unsigned wait_cycles;

  always #5 PCLK = ~PCLK;

  apb_access #(.NUM_PSEL(NP)) dut (.*);
  apb_slave_model #(.NUM_PSEL(NP)) u_apb (
    .PCLK, .PRESETn, .PSEL, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY,
    .max_wait, .xfer, .xfer_sel, .wait_cycles
  );

  int checks = 0, failures = 0, n_waited = 0, n_rd = 0, n_wr = 0;
  logic [31:0] ref_mem [logic [31:0]];

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0] ^ 16'h5A5A, a[31:16]};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic do_xfer(logic wr, int s, logic [31:0] a, logic [31:0] d);
    int unsigned w0, edges;
    logic [31:0] exp;
    exp = ref_mem.exists(a) ? ref_mem[a] : init_word(a);
    @(negedge PCLK);
    hwaddr2 = a; hwdata2 = d; hwrite2 = wr; hsel2 = NP'(1) << s;
    pendwr_p = wr; pendrd_p = !wr;
    w0 = wait_cycles;
    @(posedge PCLK); #1;
    check(PSEL == hsel2 && !PENABLE && PADDR == a && PWRITE == wr && (!wr || PWDATA == d) && !pdone,
          $sformatf("setup cycle wrong for %h", a));
    @(posedge PCLK); #1;
    check(PSEL == hsel2 && PENABLE, "access cycle wrong");
    edges = 2;
    while (!pdone && edges < 40) begin
      @(posedge PCLK); #1;
      edges++;
      if (!pdone) check(PENABLE && PSEL == hsel2 && PADDR == a, "wait state dropped the transfer");
    end
    check(pdone && PSEL == '0 && !PENABLE, "no PDONE after the access");
    check(edges == 3 + (wait_cycles - w0),
          $sformatf("transfer took %0d edges with %0d wait states", edges, wait_cycles - w0));
    if (wait_cycles != w0) n_waited++;
    if (wr) begin
      ref_mem[a] = d;
      n_wr++;
    end else begin
      check(prdata_q == exp, $sformatf("read %h got %h expected %h", a, prdata_q, exp));
      n_rd++;
    end
    repeat ($urandom_range(3, 0)) begin
      @(posedge PCLK); #1;
      check(pdone && PSEL == '0, "PDONE dropped while the request was held");
    end
    @(negedge PCLK);
    pendwr_p = 0; pendrd_p = 0;
    @(posedge PCLK); #1;
    check(!pdone, "PDONE did not fall after the request dropped");
  endtask

  initial begin
    pendwr_p = 0; pendrd_p = 0; hwaddr2 = 0; hwdata2 = 0; hwrite2 = 0; hsel2 = 0;
    repeat (2) @(posedge PCLK);
    #1 PRESETn = 1;
    repeat (3) begin
      @(posedge PCLK); #1;
      check(PSEL == '0 && !PENABLE && !pdone, "not idle without a request");
    end
    for (int i = 0; i < 300; i++) begin
      int s = $urandom_range(NP - 1, 0);
      logic [31:0] a = 32'h8000_0000 + (s << 24) + ($urandom_range(7, 0) << 2);
      do_xfer($urandom_range(1, 0), s, a, $urandom);
      if ($urandom_range(1, 0)) repeat ($urandom_range(3, 1)) @(posedge PCLK);
    end
    check(n_waited > 0 && n_rd > 0 && n_wr > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge PCLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
