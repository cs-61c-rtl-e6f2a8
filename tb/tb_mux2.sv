// tb_mux2: self-checking test of the two-input multiplexer at 32 and 5 bits.
// Random inputs on both data inputs with both select values; the output
// must equal input b when sel is 1 and input a when sel is 0.
module tb_mux2;
  logic [31:0] a, b, y;
  logic [4:0]  a5, b5, y5;
  logic        sel;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut   (.a(a),  .b(b),  .sel(sel), .y(y));
  mux2 #(.W(5))  dut5  (.a(a5), .b(b5), .sel(sel), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom; a5 = 5'($urandom); b5 = 5'($urandom);
      sel = 1'(i);
      #1;
      checks += 2;
      if (y !== (sel ? b : a))    begin failures++; $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y); end
      if (y5 !== (sel ? b5 : a5)) begin failures++; $display("FAIL5 sel=%b y5=%h", sel, y5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
