// tb_scan_chain: shifts write words in and checks the register-file write
// strobe, select, address and data; shifts capture words in and checks that
// the distance and the boundary-row word come back out of `scan_out`.
module tb_scan_chain;
  import dtw_pkg::*;
  localparam int unsigned AW = 9, SCW = 2 + AW + DIST_W;
  logic clk = 1'b0, rst_n = 1'b0, scan_in = 1'b0, scan_en = 1'b0, scan_upd = 1'b0, scan_out;
  logic wr_en, wr_sel;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [3:0] wr_data;
  logic [9:0] rd_data, distance = '0;
  int checks = 0, failures = 0;

  scan_chain #(.ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;
  assign rd_data = 10'(rd_addr) ^ 10'h2A5;   // a memory with known contents

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", s, got, exp); end
  endtask

  int nwr = 0, wsel, waddr, wdata;
  always @(posedge clk) if (wr_en) begin nwr++; wsel = wr_sel; waddr = wr_addr; wdata = wr_data; end

  task automatic shift(input logic [SCW-1:0] w, output logic [SCW-1:0] o);
    for (int k = SCW - 1; k >= 0; k--) begin
      o[k] = scan_out; scan_in = w[k]; scan_en = 1'b1; @(negedge clk);
    end
    scan_en = 1'b0;
  endtask

  task automatic upd();
    scan_upd = 1'b1; @(negedge clk); scan_upd = 1'b0;
  endtask

  initial begin
    logic [SCW-1:0] o;
    int op, ad, da;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      op = n % 2; ad = $urandom_range(511, 0); da = $urandom_range(15, 0);
      shift({2'(op), 9'(ad), 10'(da)}, o);
      chk("no write while shifting", nwr, n);
      upd();
      chk("write strobe", nwr, n + 1);
      chk("write select", wsel, op);
      chk("write addr", waddr, ad);
      chk("write data", wdata, da);
    end
    for (int n = 0; n < 10; n++) begin
      distance = 10'($urandom_range(1023, 0));
      ad = $urandom_range(511, 0);
      shift({2'd2, 9'(ad), 10'd0}, o); upd();
      shift('0, o);
      chk("captured distance", int'(o[9:0]), int'(distance));
      shift({2'd3, 9'(ad), 10'd0}, o); upd();
      shift('0, o);
      chk("captured boundary word", int'(o[9:0]), ad ^ 'h2A5);
      chk("captured word keeps its op", int'(o[SCW-1 -: 2]), 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
