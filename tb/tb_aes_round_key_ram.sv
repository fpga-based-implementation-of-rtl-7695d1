// tb_aes_round_key_ram: self-checking test of the round key store.
// Fills all 15 words with random data, reads them back through the
// asynchronous port, overwrites some words, checks that a cycle with the
// write enable low leaves the memory unchanged, and checks that a write takes
// effect at the clock edge.
module tb_aes_round_key_ram;
  logic clk = 0;
  logic we;
  logic [3:0] waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [15];
  int checks = 0, failures = 0;

  aes_round_key_ram dut (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                         .raddr_i(raddr), .rdata_o(rdata));

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write(int a, logic [127:0] d);
    @(negedge clk);
    we = 1; waddr = 4'(a); wdata = d;
    @(negedge clk);
    we = 0;
    model[a] = d;
  endtask

  task automatic read_all(string what);
    for (int a = 0; a < 15; a++) begin
      raddr = 4'(a);
      #1;
      check(what, rdata, model[a]);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 15; a++) write(a, {$urandom, $urandom, $urandom, $urandom});
    read_all("fill");
    for (int n = 0; n < 30; n++) write(int'($urandom_range(0, 14)), {$urandom, $urandom, $urandom, $urandom});
    read_all("overwrite");
    // Write enable low: data and address change, memory must not.
    @(negedge clk);
    we = 0; waddr = 4'd3; wdata = ~model[3];
    @(negedge clk);
    read_all("we low");
    // Write timing: new data appears only after the clock edge.
    @(negedge clk);
    we = 1; waddr = 4'd7; wdata = ~model[7]; raddr = 4'd7;
    #1;
    check("before edge", rdata, model[7]);
    @(posedge clk);
    #1;
    check("after edge", rdata, ~model[7]);
    model[7] = ~model[7];
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
