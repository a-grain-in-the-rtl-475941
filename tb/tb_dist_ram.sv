// tb_dist_ram: checks the distributed RAM against an array model: writes
// land at the clock edge, reads are combinational on every port, a read of
// the address being written shows the old word until the edge.
module tb_dist_ram;
  localparam int unsigned DEPTH = 32, WIDTH = 8, NRD = 2;
  logic clk = 1'b0;
  logic we;
  logic [4:0] waddr;
  logic [7:0] wdata;
  logic [NRD-1:0][4:0] raddr;
  logic [NRD-1:0][7:0] rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dist_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NRD(NRD)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr[0] = 5'(i); raddr[1] = 5'(DEPTH - 1 - i);
      #1;
      check(rdata[0] == model[i] && rdata[1] == model[DEPTH-1-i], "read after fill");
    end
    // random traffic
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = 8'($urandom);
      raddr[0] = waddr; raddr[1] = 5'($urandom);
      #1;
      check(rdata[0] == model[raddr[0]], "old data before write edge");
      check(rdata[1] == model[raddr[1]], "second port");
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check(rdata[0] == model[raddr[0]], "data after write edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
