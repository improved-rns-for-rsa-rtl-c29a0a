// tb_rns_const_mem: writes random words to every address, reads them back
// through the asynchronous read port, checks that a write beyond DEPTH is
// ignored and that reads beyond DEPTH return zero.
module tb_rns_const_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 22;
  logic        we;
  logic [7:0]  waddr, raddr;
  logic [16:0] wdata, rdata;
  logic [16:0] model [DEPTH];

  rns_const_mem #(.WIDTH(17), .DEPTH(DEPTH), .AW(8)) dut (
    .clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr), .rdata_o(rdata)
  );

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = 1; waddr = 8'(a); wdata = 17'($urandom); model[a] = wdata;
      end
      @(negedge clk);
      we = 1; waddr = 8'(DEPTH); wdata = 17'h1abcd;
      @(negedge clk);
      we = 0;
      for (int a = 0; a < DEPTH + 2; a++) begin
        raddr = 8'(a); #1;
        checks++;
        if (a < DEPTH ? rdata != model[a] : rdata != 0) begin
          failures++;
          $display("FAIL addr %0d got %h", a, rdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
