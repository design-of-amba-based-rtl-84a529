// tb_ahb_slave_if: self-checking test of the bridge's AHB address decoder
// and address-phase register.
//
// Random address phases (HSEL, HTRANS, HWRITE, HREADYIN and addresses both
// inside and outside the APB window) are applied. Every cycle the
// combinational `valid`/`tempsel` are compared with a reference decode
// written from the address map, and after every clock edge the registered
// outputs are compared with a reference register that loads only while
// HREADYIN is high. The first 40 cycles use hand-picked boundary addresses.
module tb_ahb_slave_if;
  import ahb2apb_pkg::*;

  localparam int unsigned NP = 4;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic HCLK = 0, HRESETn = 0;
  logic HSEL, HWRITE, HREADYIN;
  logic [31:0] HADDR;
  htrans_e HTRANS;
  logic valid, valid1, hwritereg;
  logic [NP-1:0] tempsel, hsel1;
  logic [31:0] hwaddr1;

  always #5 HCLK = ~HCLK;

  ahb_slave_if #(.NUM_PSEL(NP), .BASE_ADDR(BASE), .SLOT_BITS(24)) dut (.*);

  int checks = 0, failures = 0;
  int n_valid = 0, n_hold = 0, n_outside = 0;

  // reference model
  logic          r_valid;
  logic [NP-1:0] r_sel;
  logic          q_valid, q_write;
  logic [31:0]   q_addr;
  logic [NP-1:0] q_sel;

  function automatic void decode(input logic sel, input logic [1:0] tr, input logic rdy,
                                 input logic [31:0] a, output logic v, output logic [NP-1:0] s);
    logic in_win;
    in_win = (a >= BASE) && (a < BASE + 32'h0400_0000);
    s = in_win ? (NP'(1) << a[25:24]) : '0;
    v = sel && rdy && (tr == 2'b10 || tr == 2'b11) && in_win;
  endfunction

  logic [31:0] corner [8] = '{32'h8000_0000, 32'h83FF_FFFF, 32'h8400_0000, 32'h7FFF_FFFC,
                               32'h8100_0000, 32'h82FF_FFF0, 32'h0000_0000, 32'hFFFF_FFFF};

  task automatic drive_random(int i);
    HSEL     = ($urandom_range(7, 0) != 0);
    HTRANS   = htrans_e'($urandom_range(3, 0));
    HWRITE   = $urandom_range(1, 0);
    HREADYIN = ($urandom_range(3, 0) != 0);
    if (i < 40) HADDR = corner[i % 8];
    else if ($urandom_range(3, 0) == 0) HADDR = $urandom;
    else HADDR = BASE + ($urandom_range(NP - 1, 0) << 24) + $urandom_range(32'hFF_FFFF, 0);
  endtask

  initial begin
    HSEL = 0; HWRITE = 0; HREADYIN = 1; HADDR = 0; HTRANS = HTRANS_IDLE;
    q_valid = 0; q_write = 0; q_addr = 0; q_sel = 0;
    repeat (2) @(posedge HCLK);
    #1 HRESETn = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge HCLK);
      drive_random(i);
      #1;
      decode(HSEL, HTRANS, HREADYIN, HADDR, r_valid, r_sel);
      checks++;
      if (valid !== r_valid || tempsel !== r_sel) begin
        failures++;
        $display("FAIL decode: addr %h sel %b tr %0d rdy %b -> valid %b tempsel %b, expected %b %b",
                 HADDR, HSEL, HTRANS, HREADYIN, valid, tempsel, r_valid, r_sel);
      end
      if (r_valid) n_valid++;
      if (!r_sel) n_outside++;
      if (!HREADYIN) n_hold++;
      if (HREADYIN) begin
        q_valid = r_valid; q_addr = HADDR; q_write = HWRITE; q_sel = r_valid ? r_sel : '0;
      end
      @(posedge HCLK);
      #1;
      checks++;
      if (valid1 !== q_valid || hwaddr1 !== q_addr || hwritereg !== q_write || hsel1 !== q_sel) begin
        failures++;
        $display("FAIL reg: valid1 %b addr %h wr %b sel %b, expected %b %h %b %b",
                 valid1, hwaddr1, hwritereg, hsel1, q_valid, q_addr, q_write, q_sel);
      end
    end
    checks++;
    if (n_valid == 0 || n_hold == 0 || n_outside == 0) begin
      failures++;
      $display("FAIL: coverage valid %0d hold %0d outside %0d", n_valid, n_hold, n_outside);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge HCLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
