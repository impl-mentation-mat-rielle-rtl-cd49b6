// Reference model of the bit-slice network, written from the behaviour of
// the network rather than from its RTL, for the testbenches.
//
// Potentials are integers in [0, 2^P). One time step adds
// (8 >> (two MSBs)) << shift to every neuron; reaching 2^P sets its spike
// flag and subtracts 2^P. Whenever a flag is set, a propagation replaces
// evolution: the flags are taken as spiking bits and cleared, and every
// neuron i receives, for each ring position k = 0..N-1, the weight w[i*N+k]
// if neuron (i-k) mod N fired; overflowing again sets the flag, which makes
// another propagation follow. bs_ref_run returns the number of busy clocks
// the hardware needs for the run: one per time step, P*N+2 per propagation,
// one to leave evolution for each chain of propagations and one to finish.
package tb_bs_ref_pkg;

  // st[] entries: 0 time steps, 1 propagations, 2 propagations entered from
  // evolution, 3 propagations caused by a propagation, 4 propagations carrying
  // several spikes, 5 most spikes in one propagation, 6 threshold crossings
  // caused by a weight, 7 threshold crossings during evolution, 8 most
  // spikes in one time step (one chain of propagations)

  function automatic int bs_step(int p, int sh, int P);
    return p + ((8 >> (p >> (P - 2))) << sh);
  endfunction

  function automatic longint bs_ref_run(input int N, input int P, input int sh, input int steps,
                                        ref int pot[], ref bit spk[], ref int w[],
                                        ref int st[]);
    int left = steps, in_step = 0;
    bit in_chain = 0, any;
    longint cyc = 1;
    bit sb[];
    sb = new[N];
    forever begin
      any = 0;
      foreach (spk[i]) any |= spk[i];
      if (any) begin
        int n = 0;
        if (!in_chain) begin st[2]++; cyc++; in_step = 0; end
        else st[3]++;
        st[1]++;
        cyc += P * N + 2;
        foreach (spk[i]) begin sb[i] = spk[i]; n += spk[i]; spk[i] = 0; end
        if (n > 1) st[4]++;
        if (n > st[5]) st[5] = n;
        in_step += n;
        if (in_step > st[8]) st[8] = in_step;
        for (int k = 0; k < N; k++)
          for (int i = 0; i < N; i++)
            if (sb[(i - k + N) % N]) begin
              pot[i] += w[i * N + k];
              if (pot[i] >= (1 << P)) begin pot[i] -= (1 << P); spk[i] = 1; st[6]++; end
            end
        in_chain = 1;
      end else if (left == 0) begin
        break;
      end else begin
        for (int i = 0; i < N; i++) begin
          pot[i] = bs_step(pot[i], sh, P);
          if (pot[i] >= (1 << P)) begin pot[i] -= (1 << P); spk[i] = 1; st[7]++; end
        end
        left--; st[0]++; cyc++;
        in_chain = 0;
      end
    end
    return cyc;
  endfunction

endpackage
