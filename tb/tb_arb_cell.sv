// tb_arb_cell -- exhaustive self-checking test of the 4-input arbiter cell:
// all 16 request patterns x enable x wake. Awake: anyreq is the OR of the
// requests and, when enabled, exactly the lowest-numbered request is
// granted. Asleep: all outputs are zero and `lost` flags any request.
module tb_arb_cell;
  logic [3:0] req, grant;
  logic enable, wake, anyreq, lost;
  int checks = 0, failures = 0;

  arb_cell dut (.req, .enable, .wake, .grant, .anyreq, .lost);

  initial begin
    for (int r = 0; r < 16; r++)
      for (int e = 0; e < 2; e++)
        for (int w = 0; w < 2; w++) begin
          logic [3:0] g;
          req = 4'(r); enable = e[0]; wake = w[0];
          g = '0;
          if (w == 1 && e == 1)
            for (int i = 3; i >= 0; i--) if (r[i]) g = 4'(1 << i);
          #1;
          checks++;
          if (grant != g) begin failures++; $display("FAIL grant=%b want %b req=%b en=%0d wake=%0d", grant, g, req, e, w); end
          checks++;
          if (anyreq != (w == 1 && r != 0)) begin failures++; $display("FAIL anyreq req=%b wake=%0d", req, w); end
          checks++;
          if (lost != (w == 0 && r != 0)) begin failures++; $display("FAIL lost req=%b wake=%0d", req, w); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
