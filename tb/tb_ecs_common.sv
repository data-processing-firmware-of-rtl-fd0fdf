// tb_ecs_common: exercises the ECS common block over its register bus.
// Checks the reset values and read-back of the configuration registers,
// then generates known numbers of event, truncation, error and buffer-full
// pulses in the processing clock and takes snapshots by software request,
// by TFC command, by an error and by a buffer becoming full, verifying the
// snapshot count, the recorded cause and the frozen counter and occupancy
// values read back in the ECS clock.
module tb_ecs_common;
  import dp_pkg::*;
  localparam int NMON = 3, MW = 10;
  logic clk_ecs = 0, clk_dp = 0, rst_ecs_n = 1, rst_dp_n = 1;
  initial begin rst_ecs_n = 0; rst_dp_n = 0; end  // a real edge at time 0, so the asynchronous resets act at once
  always #25 clk_ecs = ~clk_ecs;
  always #4  clk_dp  = ~clk_dp;

  logic [7:0] ecs_addr = 0;
  logic ecs_wr = 0, ecs_rd = 0, ecs_rvalid;
  logic [31:0] ecs_wdata = 0, ecs_rdata;
  logic [23:0] cfg_asic_en;
  logic [MW-1:0] cfg_eps_h, cfg_eps_l;
  logic [3:0] cfg_strip_off [24];
  logic ev_done = 0, ev_trunc = 0, bxid_err = 0, fifo_full = 0, tfc_snapshot = 0, snap_taken;
  logic [7:0] ev_ftype = 0;
  logic [MW-1:0] occ_peak [NMON], occ_avg [NMON];

  ecs_common #(.NMON(NMON), .MW(MW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk_ecs); ecs_addr = a; ecs_wdata = d; ecs_wr = 1;
    @(negedge clk_ecs); ecs_wr = 0;
  endtask
  task automatic rd_check(input logic [7:0] a, input logic [31:0] exp, input string what);
    @(negedge clk_ecs); ecs_addr = a; ecs_rd = 1;
    @(negedge clk_ecs); ecs_rd = 0;
    checks++;
    if (!ecs_rvalid || ecs_rdata != exp) begin
      failures++; $display("%s: read %h (valid %b) expected %h", what, ecs_rdata, ecs_rvalid, exp);
    end
  endtask
  task automatic pulse(ref logic s, input int n);
    repeat (n) begin @(negedge clk_dp); s = 1; @(negedge clk_dp); s = 0; end
  endtask

  initial begin
    for (int m = 0; m < NMON; m++) begin occ_peak[m] = MW'(100 + m); occ_avg[m] = MW'(50 + m); end
    #60 rst_ecs_n = 1; rst_dp_n = 1;
    rd_check(8'h01, 32'hFFFFFF, "reset enable");
    rd_check(8'h02, 32'd384, "reset eps_h");
    rd_check(8'h03, 32'd128, "reset eps_l");
    rd_check(8'h04, 32'h32103210, "reset offsets");
    wr(8'h01, 32'h00ABCDEF); rd_check(8'h01, 32'h00ABCDEF, "enable");
    checks++; if (cfg_asic_en != 24'hABCDEF) begin failures++; $display("cfg_asic_en"); end
    wr(8'h02, 32'd300); wr(8'h03, 32'd20);
    checks++; if (cfg_eps_h != 300 || cfg_eps_l != 20) begin failures++; $display("eps"); end
    wr(8'h05, 32'h89ABCDEF); rd_check(8'h05, 32'h89ABCDEF, "offsets");
    checks++; if (cfg_strip_off[8] != 4'hF || cfg_strip_off[15] != 4'h8) begin failures++; $display("offset out"); end
    // counted pulses
    ev_ftype = FTYPE_NORMAL; pulse(ev_done, 7);
    ev_ftype = FTYPE_FLAG;   pulse(ev_done, 3);
    ev_ftype = FTYPE_SHORT;  pulse(ev_done, 2);
    pulse(ev_trunc, 5);
    // software snapshot
    wr(8'h00, 32'h1);
    repeat (10) @(negedge clk_ecs);
    rd_check(8'h00, 32'd1, "snapshot count");
    rd_check(8'h08, 32'b1000, "cause sw");
    rd_check(8'h10, 32'd7, "normal");
    rd_check(8'h11, 32'd3, "flag");
    rd_check(8'h12, 32'd2, "short");
    rd_check(8'h13, 32'd5, "trunc");
    rd_check(8'h14, 32'd0, "bxid err");
    rd_check(8'h20 + 8'd4, 32'd102, "peak 2");
    rd_check(8'h21 + 8'd2, 32'd51, "avg 1");
    // TFC snapshot, with new occupancies
    occ_peak[0] = MW'(7);
    pulse(ev_done, 1);   // still FTYPE_SHORT
    pulse(tfc_snapshot, 1);
    repeat (10) @(negedge clk_ecs);
    rd_check(8'h00, 32'd2, "snapshot count 2");
    rd_check(8'h08, 32'b0100, "cause tfc");
    rd_check(8'h12, 32'd3, "short 2");
    rd_check(8'h20, 32'd7, "peak 0");
    // error snapshot
    pulse(bxid_err, 1);
    repeat (10) @(negedge clk_ecs);
    rd_check(8'h08, 32'b0010, "cause error");
    rd_check(8'h14, 32'd1, "bxid err 1");
    // buffer becomes full
    @(negedge clk_dp); fifo_full = 1;
    repeat (10) @(negedge clk_ecs);
    rd_check(8'h08, 32'b0001, "cause full");
    rd_check(8'h15, 32'd1, "full count");
    rd_check(8'h00, 32'd4, "snapshot count 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
