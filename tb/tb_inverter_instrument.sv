// tb_inverter_instrument: the instrument must return the complement of every
// value written to it (checked on the document's patterns and random data).
module tb_inverter_instrument;
  logic [15:0] di, do_o;
  int checks = 0, failures = 0;
  logic [15:0] pats [5] = '{16'h0000, 16'hAAAA, 16'h5757, 16'h1234, 16'hFFFF};

  inverter_instrument dut (.di, .do_o);

  task automatic t(input logic [15:0] v);
    logic [15:0] exp;
    di = v;
    #1;
    exp = v ^ 16'hFFFF;
    checks++;
    if (do_o !== exp) begin failures++; $display("FAIL %h -> %h", v, do_o); end
  endtask

  initial begin
    foreach (pats[i]) t(pats[i]);
    repeat (200) t(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
