// tb_basic_cell -- exhaustive test of the basic cell: all 512 combinations
// of ctrl and the eight data inputs. With ctrl = 0 the cell must add
// a_i*b_j + sin_j + cin_j, with ctrl = 1 it must add q*n_j + st_j + ct_j.
module tb_basic_cell;
  logic ctrl, a_i, q, b_j, n_j, sin_j, st_j, cin_j, ct_j, sum, carry;
  int checks = 0, failures = 0;

  basic_cell dut (.*);

  initial begin
    for (int v = 0; v < 512; v++) begin
      int exp_total;
      {ctrl, a_i, q, b_j, n_j, sin_j, st_j, cin_j, ct_j} = 9'(v);
      #1;
      if (!ctrl) exp_total = (a_i && b_j ? 1 : 0) + int'(sin_j) + int'(cin_j);
      else       exp_total = (q && n_j ? 1 : 0) + int'(st_j) + int'(ct_j);
      checks++;
      if (2 * int'(carry) + int'(sum) != exp_total) begin
        failures++;
        $display("FAIL v=%b sum=%b carry=%b", 9'(v), sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
