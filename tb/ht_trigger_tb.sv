// ht_trigger_tb: applies all 16 input combinations to the default trigger
// (fires only on 1111) and to one with a custom truth table (odd parity of
// the four bits), comparing with the expected functions.
module ht_trigger_tb;
  logic w, x, y, z, f_def, f_par;
  int checks = 0, failures = 0;

  ht_trigger u_def (.w_i(w), .x_i(x), .y_i(y), .z_i(z), .fire_o(f_def));
  ht_trigger #(.TRUTH_TABLE(16'h6996)) u_par (.w_i(w), .x_i(x), .y_i(y), .z_i(z), .fire_o(f_par));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {w, x, y, z} = 4'(v);
      #1;
      checks += 2;
      if (f_def !== (w & x & y & z)) begin failures++; $display("FAIL default v=%0d", v); end
      if (f_par !== (w ^ x ^ y ^ z)) begin failures++; $display("FAIL parity v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
