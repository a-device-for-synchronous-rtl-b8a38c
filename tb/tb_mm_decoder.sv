// tb_mm_decoder: sweeps byte addresses around the two packet handler ranges
// and checks which slave sees read/write, the word address passed on, the
// write data, the read data returned and zero for unmapped addresses.
module tb_mm_decoder;
  logic [31:0] m_address, m_writedata, m_readdata;
  logic m_read, m_write, m_waitrequest;
  logic [3:0]  s_address [2];
  logic        s_read [2], s_write [2];
  logic [31:0] s_writedata [2], s_readdata [2];
  int checks = 0, failures = 0;

  mm_decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%h", what, m_address);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_readdata[0] = 32'haaaa_0000;
    s_readdata[1] = 32'hbbbb_1111;
    for (longint a = 32'h0fff_fff0; a < 32'h1000_0090; a += 4) begin
      int exp_sel;
      m_address   = 32'(a);
      m_writedata = $urandom;
      exp_sel = (a >= 32'h1000_0000 && a < 32'h1000_0040) ? 0 :
                (a >= 32'h1000_0040 && a < 32'h1000_0080) ? 1 : -1;
      for (int op = 0; op < 2; op++) begin
        m_read = (op == 0); m_write = (op == 1);
        #1;
        check(m_waitrequest == 0, "no wait states");
        for (int i = 0; i < 2; i++) begin
          check(s_read[i]  == (m_read  && exp_sel == i), "read select");
          check(s_write[i] == (m_write && exp_sel == i), "write select");
          if (exp_sel == i) begin
            check(s_address[i] == 4'((a - 32'h1000_0000 - i * 32'h40) >> 2), "word address");
            check(s_writedata[i] == m_writedata, "write data");
          end
        end
        if (m_read)
          check(m_readdata == (exp_sel == 0 ? 32'haaaa_0000 : exp_sel == 1 ? 32'hbbbb_1111 : 32'h0),
                "read data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
