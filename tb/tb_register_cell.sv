// tb_register_cell - self-checking test of the register cell.
// Random inputs; the output must equal the previous cycle's input masked to
// WIDTH bits with the control bits directly above, and nwords must match.
module tb_register_cell;
  localparam int BW = 64, WIDTH = 28, CB = 3;
  logic clk = 1'b0, rst = 1'b1;
  logic [BW-1:0] data_in = '0;
  logic [3:0]    ctrl_in = '0;
  logic [BW+7:0] value;
  logic [1:0]    nwords;
  int checks = 0, failures = 0;

  register_cell #(.BUS_WIDTH(BW), .WIDTH(WIDTH), .CTRL_BITS(CB)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [BW-1:0] d; logic [3:0] c; logic [BW+7:0] e;
    repeat (3) @(negedge clk);
    chk(value == '0, "reset value");
    rst = 1'b0;
    chk(nwords == 2'd1, "31 bits fit one read");
    for (int i = 0; i < 200; i++) begin
      d = {$urandom, $urandom}; c = 4'($urandom);
      data_in = d; ctrl_in = c;
      @(negedge clk);
      e = '0;
      e[WIDTH-1:0] = d[WIDTH-1:0];
      e[WIDTH +: CB] = c[CB-1:0];
      chk(value == e, $sformatf("value %h expected %h", value, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
