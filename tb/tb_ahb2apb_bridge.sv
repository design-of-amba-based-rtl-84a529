// tb_ahb2apb_bridge: end-to-end self-checking test of the AHB-to-APB bridge
// at its default parameters.
//
// A pipelined AHB master model drives the bridge's slave port (HREADYIN is
// the bridge's own HREADYOUT, as on a bus where it is the only slave that
// can stall) and an APB peripheral model with random wait states answers on
// the APB side. Checks:
//   * every AHB read returns the value a reference memory expects
//     (last write to that address, else the peripheral's initial pattern);
//   * every APB transfer has the expected peripheral select, address,
//     direction and write data, in AHB order, and no other APB transfer
//     happens (IDLE, BUSY, unselected and out-of-window transfers vanish);
//   * HRESP is OKAY; a write to an idle bridge completes with no wait state.
// The sequence (single write, single read, INCR4 burst write and read,
// back-to-back write/read pairs, then a random mix) is run with HCLK equal
// to PCLK, with a slow PCLK and with a fast PCLK. Each mechanism of the
// bridge is counted and a mechanism that never happened is a failure.
module tb_ahb2apb_bridge;
  import ahb2apb_pkg::*;

  localparam int unsigned NP = 4;
  localparam logic [31:0] BASE = 32'h8000_0000;

  typedef struct packed {
    logic [1:0]  trans;
    logic        sel;
    logic        write;
    logic [31:0] addr;
    logic [31:0] data;
  } op_t;

  typedef struct packed {
    int          sel;
    logic        write;
    logic [31:0] addr;
    logic [31:0] data;
  } apb_t;

  logic HCLK = 0, PCLK = 0, HRESETn = 0, PRESETn = 0;
  int   hhalf = 5, phalf = 5;

  logic        HSEL, HWRITE, HREADYOUT, PENABLE, PWRITE, PREADY;
  logic [1:0]  HTRANS, HRESP;
  logic [31:0] HADDR, HWDATA, HRDATA, PADDR, PWDATA, PRDATA;
  logic [NP-1:0] PSEL;
  int unsigned max_wait = 0;
  logic        xfer;
  int          xfer_sel;
  int unsigned wait_cycles;

  always #(hhalf) HCLK = ~HCLK;
  initial begin
    #2;
    forever #(phalf) PCLK = ~PCLK;
  end

  ahb2apb_bridge dut (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HWDATA,
    .HREADYIN(HREADYOUT), .HREADYOUT, .HRESP, .HRDATA,
    .PCLK, .PRESETn, .PSEL, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY
  );

  apb_slave_model #(.NUM_PSEL(NP)) u_apb (
    .PCLK, .PRESETn, .PSEL, .PENABLE, .PADDR, .PWRITE, .PWDATA, .PRDATA, .PREADY,
    .max_wait, .xfer, .xfer_sel, .wait_cycles
  );

  int checks = 0, failures = 0;
  op_t  q[$];
  apb_t exp_apb[$];
  logic [31:0] ref_mem [logic [31:0]];
  op_t  aph, dph;
  logic dph_stalled;
  int   dph_waits;
  int   n_latency_checked;

  // mechanism counters
  int n_single_wr, n_single_rd, n_seq_wr, n_seq_rd, n_b2b, n_wr_stall, n_rd_wait;
  int n_zero_wait_wr, n_ignored, n_busy;
  int sel_used [NP];
  int ratio_runs;

  function automatic logic [31:0] init_word(logic [31:0] a);
    return {a[15:0] ^ 16'h5A5A, a[31:16]};
  endfunction

  function automatic bit real_xfer(op_t o);
    return o.trans[1] && o.sel && (o.addr[31:26] == BASE[31:26]);
  endfunction

  function automatic op_t mk(logic [1:0] t, logic s, logic w, logic [31:0] a, logic [31:0] d);
    op_t o;
    o.trans = t; o.sel = s; o.write = w; o.addr = a; o.data = d;
    return o;
  endfunction

  localparam op_t IDLE_OP = '{trans: 2'b00, sel: 1'b0, write: 1'b0, addr: 32'h0, data: 32'h0};

  assign HSEL   = aph.sel;
  assign HTRANS = aph.trans;
  assign HADDR  = aph.addr;
  assign HWRITE = aph.write;
  assign HWDATA = dph.data;

  op_t prev_done;
  // AHB master: advance the pipeline whenever the bus is ready.
  always @(posedge HCLK) begin
    if (HRESETn) begin
      if (real_xfer(dph) && !HREADYOUT) begin
        if (dph.write) n_wr_stall++;
        else           n_rd_wait++;
      end
      if (HREADYOUT) begin
        if (real_xfer(dph)) begin
          checks++;
          if (HRESP != 2'b00) begin
            failures++;
            $display("FAIL: HRESP %0d at %h", HRESP, dph.addr);
          end
          if (dph.write) begin
            ref_mem[dph.addr] = dph.data;
            if (!dph_stalled) n_zero_wait_wr++;
            if (dph.trans == 2'b11) n_seq_wr++; else n_single_wr++;
          end else begin
            logic [31:0] exp;
            exp = ref_mem.exists(dph.addr) ? ref_mem[dph.addr] : init_word(dph.addr);
            checks++;
            if (HRDATA !== exp) begin
              failures++;
              $display("FAIL: read %h got %h expected %h", dph.addr, HRDATA, exp);
            end
            // With HCLK = PCLK (PCLK edge just after the HCLK edge) and no
            // APB wait states a read from an idle bridge takes 8 wait states:
            // issue, 2 PCLK synchroniser + SETUP + ACCESS (4 PCLK, which
            // overlap 3 HCLK), PDONE, 2 HCLK synchroniser, HRDATA load.
            if (ratio_runs == 0 && n_single_rd == 0) begin
              checks++;
              n_latency_checked++;
              if (dph_waits != 8) begin
                failures++;
                $display("FAIL: first read took %0d wait states, expected 8", dph_waits);
              end
            end
            if (dph.trans == 2'b11) n_seq_rd++; else n_single_rd++;
            if (real_xfer(prev_done) && prev_done.write) n_b2b++;
          end
          prev_done = dph;
        end
        if (real_xfer(aph)) begin
          apb_t e;
          e.sel = int'(aph.addr[25:24]); e.write = aph.write; e.addr = aph.addr; e.data = aph.data;
          exp_apb.push_back(e);
        end else if (aph.trans != 2'b00) begin
          if (aph.trans == 2'b01) n_busy++;
          n_ignored++;
        end
        dph_stalled <= 1'b0;
        dph_waits   <= 0;
        dph <= aph;
        aph <= (q.size() != 0) ? q.pop_front() : IDLE_OP;
      end else begin
        dph_stalled <= 1'b1;
        dph_waits   <= dph_waits + 1;
      end
    end
  end

  // APB monitor: compare every completed APB transfer with the expected one.
  always @(posedge PCLK) begin
    if (PRESETn && xfer) begin
      checks++;
      if (exp_apb.size() == 0) begin
        failures++;
        $display("FAIL: unexpected APB transfer to %h", PADDR);
      end else begin
        apb_t e;
        e = exp_apb.pop_front();
        if (xfer_sel != e.sel || PADDR != e.addr || PWRITE != e.write ||
            (e.write && PWDATA != e.data)) begin
          failures++;
          $display("FAIL: APB sel %0d addr %h wr %b data %h, expected sel %0d addr %h wr %b data %h",
                   xfer_sel, PADDR, PWRITE, PWDATA, e.sel, e.addr, e.write, e.data);
        end
        if (xfer_sel >= 0 && xfer_sel < int'(NP)) sel_used[xfer_sel]++;
      end
    end
  end

  task automatic wait_drained();
    while (q.size() != 0 || aph.trans != 2'b00 || dph.trans != 2'b00 || exp_apb.size() != 0)
      @(posedge HCLK);
    repeat (20) @(posedge HCLK);
  endtask

  task automatic load_sequence(int n_random);
    logic [31:0] a;
    // single write, single read (same location)
    q.push_back(mk(2'b10, 1, 1, 32'h8000_0032, 32'h0000_0024));
    for (int i = 0; i < 30; i++) q.push_back(IDLE_OP);
    q.push_back(mk(2'b10, 1, 0, 32'h8000_0032, 32'h0));
    q.push_back(IDLE_OP);
    // INCR4 burst write then burst read
    for (int i = 0; i < 4; i++)
      q.push_back(mk(i == 0 ? 2'b10 : 2'b11, 1, 1, 32'h8000_0000 + 4 * i, 32'h0000_0010 + i));
    for (int i = 0; i < 4; i++)
      q.push_back(mk(i == 0 ? 2'b10 : 2'b11, 1, 0, 32'h8000_0000 + 4 * i, 32'h0));
    // back-to-back write / read pairs, one per peripheral
    for (int i = 0; i < int'(NP); i++) begin
      a = BASE + (i << 24) + 32'h100;
      q.push_back(mk(2'b10, 1, 1, a, $urandom));
      q.push_back(mk(2'b10, 1, 0, a, 32'h0));
    end
    // random mix, including IDLE, BUSY, unselected and out-of-window transfers
    for (int i = 0; i < n_random; i++) begin
      int kind = $urandom_range(9, 0);
      a = BASE + ($urandom_range(NP - 1, 0) << 24) + ($urandom_range(15, 0) << 2);
      case (kind)
        0: q.push_back(IDLE_OP);
        1: q.push_back(mk(2'b01, 1, $urandom_range(1, 0), a, $urandom));
        2: q.push_back(mk(2'b10, 0, $urandom_range(1, 0), a, $urandom));
        3: q.push_back(mk(2'b10, 1, $urandom_range(1, 0), 32'h4000_0000 | a, $urandom));
        default: q.push_back(mk(kind[0] ? 2'b10 : 2'b11, 1, $urandom_range(1, 0), a, $urandom));
      endcase
    end
  endtask

  task automatic run_ratio(int hh, int ph, int unsigned mw, int n_random);
    hhalf = hh; phalf = ph; max_wait = mw;
    load_sequence(n_random);
    wait_drained();
    ratio_runs++;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    aph = IDLE_OP; dph = IDLE_OP; prev_done = IDLE_OP; dph_stalled = 0; dph_waits = 0;
    repeat (4) @(posedge HCLK);
    HRESETn = 1; PRESETn = 1;
    repeat (2) @(posedge HCLK);
    run_ratio(5, 5, 0, 100);    // HCLK = PCLK, no APB wait states
    run_ratio(5, 5, 3, 100);    // HCLK = PCLK, APB wait states
    run_ratio(5, 17, 2, 100);   // PCLK slower than HCLK
    run_ratio(13, 4, 3, 100);   // PCLK faster than HCLK
    $display("mechanisms:");
    need("single write", n_single_wr);
    need("single read", n_single_rd);
    need("burst write (SEQ)", n_seq_wr);
    need("burst read (SEQ)", n_seq_rd);
    need("back-to-back write/read", n_b2b);
    need("zero-wait posted write", n_zero_wait_wr);
    need("write stalled, buffer busy", n_wr_stall);
    need("read wait cycles", n_rd_wait);
    need("APB wait states", int'(wait_cycles));
    need("ignored transfers", n_ignored);
    need("BUSY transfers", n_busy);
    for (int i = 0; i < int'(NP); i++) need($sformatf("PSEL[%0d] used", i), sel_used[i]);
    need("read latency checked", n_latency_checked);
    need("clock ratios run", ratio_runs == 4 ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #4000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
