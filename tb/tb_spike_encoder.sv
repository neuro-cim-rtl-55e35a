// tb_spike_encoder -- every activation 0..15 on 64 channels over 16
// timesteps; spikes must match an accumulate-and-carry rate coder and
// total exactly the activation value.
module tb_spike_encoder;
  import ncim_pkg::*;
  import ncim_tb_pkg::*;

  logic [3:0] act [NUM_ROWS];
  logic [T_W-1:0] t;
  logic [NUM_ROWS-1:0] spikes;
  int checks = 0, failures = 0;

  spike_encoder dut (.act, .t, .spikes);

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      int tot [NUM_ROWS];
      bit [15:0] tr [NUM_ROWS];
      for (int i = 0; i < NUM_ROWS; i++) begin
        act[i] = (rep == 0) ? 4'(i % 16) : 4'($urandom_range(0, 15));
        tr[i] = spike_train(act[i]);
        tot[i] = 0;
      end
      for (int s = 0; s < 16; s++) begin
        t = T_W'(s);
        #1;
        for (int i = 0; i < NUM_ROWS; i++) begin
          tot[i] += spikes[i];
          checks++;
          if (spikes[i] != tr[i][s]) begin failures++; $display("FAIL a=%0d t=%0d", act[i], s); end
        end
      end
      for (int i = 0; i < NUM_ROWS; i++) begin
        checks++;
        if (tot[i] != act[i]) begin failures++; $display("FAIL total a=%0d got %0d", act[i], tot[i]); end
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
