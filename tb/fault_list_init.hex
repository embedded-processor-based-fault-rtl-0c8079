49f767c45
5bde5c099
bcb91ce37
df1446bea
abd69fe29
8ec1d7da0
d076ce2ef
c77330bdb
