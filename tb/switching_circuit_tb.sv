// switching_circuit_tb: a small switching circuit (3 regions of 6 flops)
// checked against a model of its rings: a running region shifts its ring by
// one every clock, so bit 0 toggles every cycle; a disabled region, or any
// region while paused, holds its contents.
`timescale 1ns/1ps
module switching_circuit_tb;
  localparam int R = 3, F = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, pause = 1'b0;
  logic [R-1:0] region_en = '0, probe, active;
  logic [F-1:0] model [R];
  int toggles = 0, holds = 0;

  switching_circuit #(.REGIONS(R), .FLOPS_PER_REGION(F)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int g = 0; g < R; g++) model[g] = 6'b101010;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int g = 0; g < R; g++) check(probe[g] == model[g][0], "reset pattern");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i % 10 == 0) region_en = R'($urandom);
      pause = (i % 37) > 30;
      @(posedge clk);
      for (int g = 0; g < R; g++) begin
        if (region_en[g] && !pause) begin
          model[g] = {model[g][F-2:0], model[g][F-1]};
          toggles++;
        end else begin
          holds++;
        end
      end
      #1;
      for (int g = 0; g < R; g++) begin
        check(probe[g] == model[g][0], $sformatf("region %0d probe, cycle %0d", g, i));
      end
      check(dut.g_region[0].ring == model[0], "region 0 contents");
      check(dut.g_region[1].ring == model[1], "region 1 contents");
      check(dut.g_region[2].ring == model[2], "region 2 contents");
      check(active == (region_en & {R{!pause}}), "active flags");
    end
    check(toggles > 0 && holds > 0, "regions both ran and held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
