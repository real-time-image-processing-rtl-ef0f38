// tb_dpram: self-checking test of the dual-port RAM.
// Writes random words through port B, reads them back on both ports against
// a shadow array, and checks that a read of an address written in the same
// clock returns the old contents (read-before-write) on both ports.
module tb_dpram;
  localparam int DEPTH = 16, WIDTH = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             a_en, b_en, b_we;
  logic [3:0]       a_addr, b_addr;
  logic [WIDTH-1:0] a_q, b_q, b_din;
  logic [WIDTH-1:0] shadow [DEPTH];

  dpram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; b_din = 0;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 4'(i); b_din = 8'($urandom); shadow[i] = b_din;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    // random mixed traffic
    for (int n = 0; n < 400; n++) begin
      logic [WIDTH-1:0] exp_a, exp_b;
      @(negedge clk);
      a_en = 1; a_addr = 4'($urandom);
      b_en = 1; b_we = 1'($urandom); b_addr = ($urandom % 4 == 0) ? a_addr : 4'($urandom);
      b_din = 8'($urandom);
      exp_a = shadow[a_addr];
      exp_b = shadow[b_addr];
      if (b_we) shadow[b_addr] = b_din;
      @(posedge clk); #1;
      check("port A read", a_q, exp_a);
      check("port B read", b_q, exp_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
