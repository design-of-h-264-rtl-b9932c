// Reference intra predictor shared by the intra testbenches: evaluates the
// H.264 4x4 / 8x8 prediction equations pixel by pixel from the neighbour
// arrays rt (row above, index x = -1..2N-1 stored at x+1) and rl (column to
// the left, index y = -1..N-1 stored at y+1), with all neighbours present.
function automatic int ref_dir(int n, int mode, int x, int y, int rt [17], int rl [9]);
  int z;
  case (mode)
    0: return rt[x+1];
    1: return rl[y+1];
    2: begin
         automatic int s = 0;
         for (int i = 0; i < n; i++) s += rt[i+1] + rl[i+1];
         return (s + n) >> (n == 4 ? 3 : 4);
       end
    3: if (x == n-1 && y == n-1) return (rt[2*n-2+1] + 3*rt[2*n-1+1] + 2) >> 2;
       else return (rt[x+y+1] + 2*rt[x+y+2] + rt[x+y+3] + 2) >> 2;
    4: if (x > y) return (rt[x-y-2+1] + 2*rt[x-y-1+1] + rt[x-y+1] + 2) >> 2;
       else if (x < y) return (rl[y-x-2+1] + 2*rl[y-x-1+1] + rl[y-x+1] + 2) >> 2;
       else return (rt[1] + 2*rt[0] + rl[1] + 2) >> 2;
    5: begin
         z = 2*x - y;
         if (z >= 0 && z % 2 == 0) return (rt[x-(y>>1)-1+1] + rt[x-(y>>1)+1] + 1) >> 1;
         else if (z > 0) return (rt[x-(y>>1)-2+1] + 2*rt[x-(y>>1)-1+1] + rt[x-(y>>1)+1] + 2) >> 2;
         else if (z == -1) return (rl[1] + 2*rl[0] + rt[1] + 2) >> 2;
         else return (rl[y-2*x-1+1] + 2*rl[y-2*x-2+1] + rl[y-2*x-3+1] + 2) >> 2;
       end
    6: begin
         z = 2*y - x;
         if (z >= 0 && z % 2 == 0) return (rl[y-(x>>1)-1+1] + rl[y-(x>>1)+1] + 1) >> 1;
         else if (z > 0) return (rl[y-(x>>1)-2+1] + 2*rl[y-(x>>1)-1+1] + rl[y-(x>>1)+1] + 2) >> 2;
         else if (z == -1) return (rl[1] + 2*rl[0] + rt[1] + 2) >> 2;
         else return (rt[x-2*y-1+1] + 2*rt[x-2*y-2+1] + rt[x-2*y-3+1] + 2) >> 2;
       end
    7: if (y % 2 == 0) return (rt[x+(y>>1)+1] + rt[x+(y>>1)+2] + 1) >> 1;
       else return (rt[x+(y>>1)+1] + 2*rt[x+(y>>1)+2] + rt[x+(y>>1)+3] + 2) >> 2;
    default: begin
         z = x + 2*y;
         if (z > 2*n-3) return rl[n-1+1];
         else if (z == 2*n-3) return (rl[n-2+1] + 3*rl[n-1+1] + 2) >> 2;
         else if (z % 2 == 0) return (rl[y+(x>>1)+1] + rl[y+(x>>1)+2] + 1) >> 1;
         else return (rl[y+(x>>1)+1] + 2*rl[y+(x>>1)+2] + rl[y+(x>>1)+3] + 2) >> 2;
       end
  endcase
endfunction
