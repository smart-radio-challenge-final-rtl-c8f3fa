// tb_cmd_router: self-checking test of the R_f command router. For every
// value of R_f's command bits and random valid/ready patterns it checks
// that a word goes to exactly the port of its service (0 RS encoder,
// 1 convolutional encoder, 2 upconverter, 3 RS decoder, 4 Viterbi path),
// that the input is ready exactly when that port is, and that words under
// a reserved command are dropped and flagged.
module tb_cmd_router;
  import sdr_pkg::*;
  cmd_e cmd;
  logic in_valid, in_ready, dropped;
  logic [31:0] in_data, out_data;
  logic [4:0] out_valid, out_ready;
  int checks = 0, failures = 0;

  cmd_router dut (.*);

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [31:0] rf;
      int port;
      rf = $urandom & 32'h0000_0013;
      cmd = rf_to_cmd(rf);
      in_valid = 1'($urandom_range(0, 1));
      out_ready = 5'($urandom);
      in_data = $urandom;
      // expected port from the R_f number and the receive flag
      case ({rf[4], rf[1:0]})
        3'b000: port = 0;
        3'b001: port = 1;
        3'b010: port = 2;
        3'b110: port = 3;
        3'b111: port = 4;
        default: port = -1;
      endcase
      #1;
      checks += 4;
      if (port >= 0) begin
        if (out_valid != (in_valid ? 5'(1 << port) : 5'd0)) failures++;
        if (in_ready != out_ready[port]) failures++;
        if (dropped) failures++;
      end else begin
        if (out_valid != 0) failures++;
        if (!in_ready) failures++;
        if (dropped != in_valid) failures++;
      end
      if (out_data != in_data) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
