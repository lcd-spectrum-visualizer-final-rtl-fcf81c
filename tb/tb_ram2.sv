// tb_ram2: self-checking test of the two-port RAM.
// Writes random words through both ports at once, checks that both ports read
// them back asynchronously, that nothing is written while we is low, and
// compares against a shadow array kept by the testbench.
module tb_ram2;
  localparam int DEPTH = 32, WIDTH = 32;
  logic clk = 0, we = 0;
  logic [4:0] adr_a = 0, adr_b = 0;
  logic [WIDTH-1:0] wd_a = 0, wd_b = 0, rd_a, rd_b;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  ram2 #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // fill every word: port A writes even addresses, port B odd ones
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      we = 1; adr_a = 5'(i); adr_b = 5'(i + 1);
      wd_a = $urandom; wd_b = $urandom;
      shadow[i] = wd_a; shadow[i+1] = wd_b;
    end
    @(negedge clk); we = 0;
    // read back all pairs
    for (int i = 0; i < DEPTH; i++) begin
      adr_a = 5'(i); adr_b = 5'(DEPTH - 1 - i); #1;
      check(rd_a, shadow[i], "port A read");
      check(rd_b, shadow[DEPTH-1-i], "port B read");
    end
    // random traffic, with and without write enable
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      we = 1'($urandom);
      adr_a = 5'($urandom); adr_b = 5'($urandom);
      while (adr_b == adr_a) adr_b = 5'($urandom);
      wd_a = $urandom; wd_b = $urandom;
      #1;
      check(rd_a, shadow[adr_a], "read before write A");
      check(rd_b, shadow[adr_b], "read before write B");
      if (we) begin
        shadow[adr_a] = wd_a;
        shadow[adr_b] = wd_b;
      end
      @(posedge clk); #1;
      check(rd_a, shadow[adr_a], "read after edge A");
      check(rd_b, shadow[adr_b], "read after edge B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
