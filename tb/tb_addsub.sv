// tb_addsub -- self-checking testbench for the 32-bit adder/subtractor.
//
// Random and carry-boundary operands in both modes; the expected result is
// the 64-bit integer sum or difference reduced modulo 2^32.
module tb_addsub;

  localparam int unsigned W = 32;

  logic [W-1:0] dataa, datab, result;
  logic         add_sub;

  int checks = 0;
  int failures = 0;

  addsub dut (.dataa(dataa), .datab(datab), .add_sub(add_sub), .result(result));

  task automatic check_one(input logic [W-1:0] a, input logic [W-1:0] b, input logic m);
    longint unsigned full;
    logic [W-1:0] expected;
    dataa   = a;
    datab   = b;
    add_sub = m;
    #1;
    full     = m ? (longint'(a) + longint'(b)) : (longint'(a) - longint'(b));
    expected = W'(full);
    checks++;
    if (result !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h add_sub=%b result=%h expected=%h", a, b, m, result, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'hFFFF_FFFF, 32'h0000_0001, 1'b1);
    check_one(32'h0000_0000, 32'h0000_0001, 1'b0);
    check_one(32'h7FFF_FFFF, 32'h0000_0001, 1'b1);
    check_one(32'h8000_0000, 32'h0000_0001, 1'b0);
    for (int r = 0; r < 2000; r++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
