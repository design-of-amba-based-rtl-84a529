// tb_ahb_response: self-checking test of the bridge's AHB data-phase
// controller.
//
// The testbench plays the registered address phase (valid1, hwaddr1,
// hwritereg, hsel1) with HWDATA, holding it while HREADYOUT is low, as the
// slave interface and an AHB master would. A fake APB side answers each
// PENDWR/PENDRD after a random delay with PDONE and read data
// addr ^ 32'h1234_5678, and drops PDONE a random time after the request
// drops; outside PDONE its read data is garbage. Checked:
//   * each request carries the expected buffer contents (address, data,
//     direction, select) and requests appear in AHB order;
//   * a write to an idle controller completes with no wait state;
//   * a read completes exactly two HCLK edges after PDONE rises, with the
//     fake APB side's data on HRDATA;
//   * no new request rises while PDONE is still high; HRESP is OKAY.
module tb_ahb_response;
  import ahb2apb_pkg::*;

  localparam int unsigned NP = 4;

  logic HCLK = 0, HRESETn = 0;
  logic valid1, hwritereg, HREADYOUT, pendwr, pendrd, hwrite2, pdone_h;
  logic [31:0] hwaddr1, HWDATA, HRDATA, hwaddr2, hwdata2, prdata;
  logic [NP-1:0] hsel1, hsel2;
  hresp_e HRESP;

  always #5 HCLK = ~HCLK;

  ahb_response #(.NUM_PSEL(NP)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0, done_rise_cyc = 0;
  int n_zero_wait = 0, n_wr_stall = 0, n_rd = 0;

  typedef struct packed {
    logic        write;
    logic [31:0] addr;
    logic [31:0] data;
    logic [NP-1:0] sel;
  } req_t;
  req_t exp_q[$];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // fake APB side with the four-phase handshake
  int delay;
  logic pdone_was = 1'b0;
  always @(posedge HCLK) begin
    cyc++;
    pdone_was = pdone_h;
    if (HRESETn) begin
      check(HRESP == HRESP_OKAY, "HRESP not OKAY");
      check(!(pendwr && pendrd), "both requests high");
      if ((pendwr || pendrd) && !pdone_h) begin
        if (delay == 0) begin
          req_t e;
          check(exp_q.size() != 0, "request without a transfer");
          if (exp_q.size() != 0) begin
            e = exp_q.pop_front();
            check(pendwr == e.write && hwrite2 == e.write && hwaddr2 == e.addr && hsel2 == e.sel
                  && (!e.write || hwdata2 == e.data),
                  $sformatf("buffer %b %h %h %b expected %b %h %h %b", hwrite2, hwaddr2, hwdata2,
                            hsel2, e.write, e.addr, e.data, e.sel));
          end
          pdone_h <= 1'b1;
          prdata  <= hwaddr2 ^ 32'h1234_5678;
          done_rise_cyc = cyc;
          delay = $urandom_range(4, 0);
        end else delay--;
      end else if (pdone_h && !(pendwr || pendrd)) begin
        if (delay == 0) begin
          pdone_h <= 1'b0;
          prdata  <= $urandom;
          delay = $urandom_range(5, 0);
        end else delay--;
      end else if (pdone_h && cyc > done_rise_cyc + 1) begin
        // the controller sees PDONE one edge after it rises and must drop
        // its request on that edge
        check(1'b0, "request still high one edge after PDONE");
      end
    end
  end

  task automatic ahb_xfer(logic wr, logic [31:0] a, logic [31:0] d);
    req_t e;
    int waits = 0;
    bit idle_before;
    @(negedge HCLK);
    // idle: no request, and PDONE low now and at the last edge
    idle_before = !pendwr && !pendrd && !pdone_h && !pdone_was;
    valid1 = 1; hwritereg = wr; hwaddr1 = a; hsel1 = NP'(1) << a[25:24]; HWDATA = d;
    e.write = wr; e.addr = a; e.data = d; e.sel = hsel1;
    exp_q.push_back(e);
    #1;
    while (!HREADYOUT) begin
      @(posedge HCLK);
      waits++;
      @(negedge HCLK); #1;
      check(waits < 200, "data phase never ends");
      if (waits >= 200) break;
    end
    @(posedge HCLK); #1;
    if (wr) begin
      if (idle_before) begin
        check(waits == 0, "write to an idle controller was stalled");
        n_zero_wait++;
      end
      if (waits != 0) n_wr_stall++;
    end else begin
      check(HRDATA == (a ^ 32'h1234_5678), $sformatf("read %h got %h", a, HRDATA));
      check(cyc == done_rise_cyc + 2, $sformatf("read ended %0d edges after PDONE rose",
                                                cyc - done_rise_cyc));
      n_rd++;
    end
    valid1 = 0;
  endtask

  initial begin
    valid1 = 0; hwritereg = 0; hwaddr1 = 0; hsel1 = 0; HWDATA = 0;
    pdone_h = 0; prdata = 0; delay = 0;
    repeat (2) @(posedge HCLK);
    #1 HRESETn = 1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a = 32'h8000_0000 + ($urandom_range(3, 0) << 24) + ($urandom_range(63, 0) << 2);
      ahb_xfer($urandom_range(1, 0), a, $urandom);
      if ($urandom_range(3, 0) == 0) repeat ($urandom_range(20, 1)) @(posedge HCLK);
    end
    repeat (40) @(posedge HCLK);
    check(exp_q.size() == 0, "transfers left unperformed");
    check(n_zero_wait > 0 && n_wr_stall > 0 && n_rd > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge HCLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
