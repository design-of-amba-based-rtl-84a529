// tb_control_transfer: self-checking test of the bridge's clock-domain
// crossing.
//
// HCLK (period 10) and PCLK (period 14) are unrelated, and the inputs are
// changed away from the receiving clock's rising edges. After every change
// of PENDWR or PENDRD the synchronised copy must follow after exactly
// SYNC_STAGES rising PCLK edges, and after every change of PDONE the HCLK
// copy must follow after exactly SYNC_STAGES rising HCLK edges, and no
// output may change at any other time. Two instances are checked, with two
// and with three synchroniser stages.
module tb_control_transfer;

  logic HCLK = 0, PCLK = 0, HRESETn = 0, PRESETn = 0;
  logic pendwr, pendrd, pdone;
  logic pdone_h2, pendwr_p2, pendrd_p2;
  logic pdone_h3, pendwr_p3, pendrd_p3;

  always #5 HCLK = ~HCLK;
  always #7 PCLK = ~PCLK;

  control_transfer #(.SYNC_STAGES(2)) dut2 (
    .HCLK, .HRESETn, .PCLK, .PRESETn, .pendwr, .pendrd, .pdone_h(pdone_h2),
    .pendwr_p(pendwr_p2), .pendrd_p(pendrd_p2), .pdone
  );
  control_transfer #(.SYNC_STAGES(3)) dut3 (
    .HCLK, .HRESETn, .PCLK, .PRESETn, .pendwr, .pendrd, .pdone_h(pdone_h3),
    .pendwr_p(pendwr_p3), .pendrd_p(pendrd_p3), .pdone
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Toggle one request line in HCLK time and follow it in PCLK edges.
  task automatic step_request(bit which_rd);
    logic v;
    @(negedge HCLK);
    if (which_rd) begin pendrd = !pendrd; v = pendrd; end
    else          begin pendwr = !pendwr; v = pendwr; end
    for (int e = 1; e <= 3; e++) begin
      @(posedge PCLK); #1;
      if (which_rd) begin
        check(pendrd_p2 == (e >= 2 ? v : !v), $sformatf("PENDRD 2-stage edge %0d", e));
        check(pendrd_p3 == (e >= 3 ? v : !v), $sformatf("PENDRD 3-stage edge %0d", e));
      end else begin
        check(pendwr_p2 == (e >= 2 ? v : !v), $sformatf("PENDWR 2-stage edge %0d", e));
        check(pendwr_p3 == (e >= 3 ? v : !v), $sformatf("PENDWR 3-stage edge %0d", e));
      end
    end
  endtask

  task automatic step_done();
    logic v;
    @(negedge PCLK);
    pdone = !pdone; v = pdone;
    for (int e = 1; e <= 3; e++) begin
      @(posedge HCLK); #1;
      check(pdone_h2 == (e >= 2 ? v : !v), $sformatf("PDONE 2-stage edge %0d", e));
      check(pdone_h3 == (e >= 3 ? v : !v), $sformatf("PDONE 3-stage edge %0d", e));
    end
  endtask

  initial begin
    pendwr = 0; pendrd = 0; pdone = 0;
    repeat (3) @(posedge PCLK);
    #1 HRESETn = 1; PRESETn = 1;
    check(!pendwr_p2 && !pendrd_p2 && !pdone_h2 && !pendwr_p3 && !pendrd_p3 && !pdone_h3,
          "outputs not low after reset");
    for (int i = 0; i < 200; i++) begin
      case ($urandom_range(2, 0))
        0: step_request(0);
        1: step_request(1);
        default: step_done();
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge HCLK);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
