// Exhaustive test of the column encoder at its default size (104 columns):
// every one-hot request gives its column number and raises the event
// request; the receiver acknowledge is passed back unchanged.
module tb_aer_col_encoder;
  localparam int N = 104;
  localparam int AW = $clog2(N);
  logic [N-1:0] ao;
  logic ack, req, ai;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;

  aer_col_encoder dut (.ao_i(ao), .ack_i(ack), .req_o(req), .addr_o(addr), .ai_o(ai));

  initial begin
    ao = '0; ack = 1'b0; #1;
    checks++; if (req !== 1'b0 || ai !== 1'b0) failures++;
    ack = 1'b1; #1;
    checks++; if (ai !== 1'b1) failures++;
    for (int n = 0; n < N; n++) begin
      ao = '0; ao[n] = 1'b1; ack = n[0]; #1;
      checks++;
      if (int'(addr) != n || req !== 1'b1 || ai !== n[0]) begin
        failures++;
        $display("FAIL column %0d: addr=%0d req=%b ai=%b", n, addr, req, ai);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
