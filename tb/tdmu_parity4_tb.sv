// Checks tdmu_parity4 against a bit-by-bit reference over random words.
module tdmu_parity4_tb;
  import tdmu_pkg::*;
  logic [DATA_BITS-1:0] data;
  logic [PAR_BITS-1:0]  par;
  int checks = 0, failures = 0;
  int starts [4] = '{0, 13, 27, 40};

  tdmu_parity4 dut (.data, .par);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] exp_par;
      data = {$urandom, $urandom};
      if (n < 60) data = 60'd1 << n;   // walking one: checks coverage of every bit
      #1;
      exp_par = '0;
      for (int k = 0; k < 4; k++)
        for (int i = 0; i < 60; i++)
          if (i >= starts[k] && i < starts[k] + 20) exp_par[k] ^= data[i];
      checks++;
      if (par !== exp_par) begin
        failures++;
        if (failures < 5) $display("mismatch data=%h par=%b exp=%b", data, par, exp_par);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
